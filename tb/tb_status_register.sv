// tb_status_register: the ten supply status lines appear in bits 9:0 two
// clocks after they change, the module flags in bits 15:10.
module tb_status_register;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [9:0] ps_status;
  logic [5:0] flags;
  logic [15:0] word;
  int checks = 0, failures = 0;

  status_register #(.NSTAT(10)) dut (.clk, .rst_n, .ps_status, .flags, .word);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ps_status = 0; flags = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic [9:0] old;
      old = word[9:0];
      ps_status = 10'($urandom); flags = 6'($urandom);
      @(negedge clk);
      checks++;
      if (word[9:0] !== old || word[15:10] !== flags) begin failures++; $display("FAIL one clock"); end
      @(negedge clk);
      checks++;
      if (word !== {flags, ps_status}) begin failures++; $display("FAIL two clocks %h", word); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
