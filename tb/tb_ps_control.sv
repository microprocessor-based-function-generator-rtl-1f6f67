// tb_ps_control: on/off follows bit 0 of each write; a write with bit 1 gives
// a reset pulse of exactly PSR_CYCLES clocks (run with 20).
module tb_ps_control;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we, ps_on, ps_reset;
  logic [1:0] wdata;
  int checks = 0, failures = 0;

  ps_control #(.PSR_CYCLES(20)) dut (.clk, .rst_n, .we, .wdata, .ps_on, .ps_reset);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (ps_on || ps_reset) begin failures++; $display("FAIL after reset"); end
    for (int n = 0; n < 50; n++) begin
      int len;
      wdata = 2'($urandom); we = 1; @(negedge clk); we = 0;
      checks++; if (ps_on != wdata[0]) begin failures++; $display("FAIL on/off"); end
      len = 0;
      while (ps_reset && len < 100) begin len++; @(negedge clk); end
      checks++;
      if (len != (wdata[1] ? 20 : 0)) begin failures++; $display("FAIL reset length %0d", len); end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
