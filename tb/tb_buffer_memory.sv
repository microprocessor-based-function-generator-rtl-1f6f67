// tb_buffer_memory: random Camac word and processor byte traffic, never on
// both ports in one clock, checked against a byte-array reference in which
// byte 2k is the low half of word k. Checks one-clock read latency.
module tb_buffer_memory;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        c_re, c_we, p_re, p_we;
  logic [6:0]  c_addr;
  logic [7:0]  p_addr, p_wdata, p_rdata;
  logic [15:0] c_wdata, c_rdata;
  logic [7:0]  ref_mem [256];
  int checks = 0, failures = 0;

  buffer_memory #(.WORDS(128)) dut (.clk, .rst_n, .c_re, .c_we, .c_addr, .c_wdata, .c_rdata,
                                    .p_re, .p_we, .p_addr, .p_wdata, .p_rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c_re = 0; c_we = 0; p_re = 0; p_we = 0; c_addr = 0; p_addr = 0; c_wdata = 0; p_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill through Camac
    for (int k = 0; k < 128; k++) begin
      c_we = 1; c_addr = 7'(k); c_wdata = 16'($urandom);
      ref_mem[2*k] = c_wdata[7:0]; ref_mem[2*k+1] = c_wdata[15:8];
      @(negedge clk);
    end
    c_we = 0;
    for (int n = 0; n < 4000; n++) begin
      int op;
      op = $urandom % 4;
      c_re = 0; c_we = 0; p_re = 0; p_we = 0;
      c_addr = 7'($urandom); p_addr = 8'($urandom);
      c_wdata = 16'($urandom); p_wdata = 8'($urandom);
      case (op)
        0: c_re = 1;
        1: c_we = 1;
        2: p_re = 1;
        default: p_we = 1;
      endcase
      @(negedge clk);
      if (c_we) begin ref_mem[2*c_addr] = c_wdata[7:0]; ref_mem[2*c_addr+1] = c_wdata[15:8]; end
      if (p_we) ref_mem[p_addr] = p_wdata;
      if (c_re) begin
        checks++;
        if (c_rdata !== {ref_mem[2*c_addr+1], ref_mem[2*c_addr]}) begin
          failures++; $display("FAIL camac read %0d: %h", c_addr, c_rdata);
        end
      end
      if (p_re) begin
        checks++;
        if (p_rdata !== ref_mem[p_addr]) begin
          failures++; $display("FAIL byte read %0d: %h exp %h", p_addr, p_rdata, ref_mem[p_addr]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
