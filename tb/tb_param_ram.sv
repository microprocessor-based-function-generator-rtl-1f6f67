// tb_param_ram: writes every word of the 1 kbyte RAM, then random reads and
// writes against a reference array; read data must appear one clock later.
module tb_param_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        we;
  logic [8:0]  addr;
  logic [15:0] wdata, rdata;
  logic [15:0] ref_mem [512];
  int checks = 0, failures = 0;

  param_ram #(.WORDS(512)) dut (.clk, .we, .addr, .wdata, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int k = 0; k < 512; k++) begin
      we = 1; addr = 9'(k); wdata = 16'($urandom); ref_mem[k] = wdata;
      @(negedge clk);
    end
    for (int n = 0; n < 4000; n++) begin
      we = ($urandom % 3) == 0; addr = 9'($urandom); wdata = 16'($urandom);
      @(negedge clk);
      if (we) ref_mem[addr] = wdata;
      else begin
        checks++;
        if (rdata !== ref_mem[addr]) begin failures++; $display("FAIL addr %0d", addr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
