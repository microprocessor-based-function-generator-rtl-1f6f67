// tb_reset_gen: reset holds for RESET_CYCLES+1 clock edges (run with 10) after
// power-on and after a Camac Z*S2; Z without S2 does nothing.
module tb_reset_gen;
  logic clk = 0, por_n = 0, camac_z = 0, camac_s2 = 0, rst_n;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  reset_gen #(.RESET_CYCLES(10)) dut (.clk, .por_n, .camac_z, .camac_s2, .rst_n);

  task automatic measure(input int expv, string what);
    int len;
    len = 0;
    while (!rst_n && len < 100) begin @(negedge clk); len++; end
    checks++;
    if (len != expv) begin failures++; $display("FAIL %s: %0d clocks", what, len); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++; if (rst_n) begin failures++; $display("FAIL reset during por"); end
    por_n = 1;
    measure(11, "power-on");
    repeat (5) @(negedge clk);
    camac_z = 1; @(negedge clk); camac_z = 0;
    checks++; if (!rst_n) begin failures++; $display("FAIL Z without S2"); end
    camac_z = 1; camac_s2 = 1; @(negedge clk); camac_z = 0; camac_s2 = 0;
    checks++; if (rst_n) begin failures++; $display("FAIL Z*S2 no reset"); end
    measure(11, "Z*S2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
