// tb_buffer_arbiter: the first-come first-served rules. A Camac access is
// granted while the flip-flop is clear and refused (no-Q) while it is set; a
// set attempt in the clock of a Camac access fails and the flip-flop reads
// back clear; clearing releases the buffer. Random traffic is checked against
// a reference flip-flop.
module tb_buffer_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cpu_set, cpu_clr, camac_req, camac_grant, cpu_owns;
  int checks = 0, failures = 0;
  bit model;

  buffer_arbiter dut (.clk, .rst_n, .cpu_set, .cpu_clr, .camac_req, .camac_grant, .cpu_owns);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cpu_set = 0; cpu_clr = 0; camac_req = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Camac alone is granted
    camac_req = 1; #1; chk(camac_grant, "camac granted when free"); @(negedge clk);
    // set attempt during a Camac access fails
    cpu_set = 1; #1; chk(camac_grant, "camac keeps the clock it arrived in"); @(negedge clk);
    cpu_set = 0; camac_req = 0; #1;
    chk(!cpu_owns, "set attempt during camac access fails");
    // set attempt with the buffer free succeeds
    cpu_set = 1; @(negedge clk); cpu_set = 0;
    chk(cpu_owns, "set succeeds when free");
    camac_req = 1; #1; chk(!camac_grant, "camac refused while flip-flop set"); @(negedge clk);
    camac_req = 0; chk(cpu_owns, "flip-flop held");
    cpu_clr = 1; @(negedge clk); cpu_clr = 0;
    chk(!cpu_owns, "cleared");
    camac_req = 1; #1; chk(camac_grant, "camac granted after release"); @(negedge clk);
    camac_req = 0;
    model = 0;
    for (int n = 0; n < 2000; n++) begin
      cpu_set = ($urandom % 4) == 0; cpu_clr = ($urandom % 8) == 0; camac_req = ($urandom % 3) == 0;
      #1;
      chk(camac_grant == (camac_req && !model), "random grant");
      @(negedge clk);
      if (cpu_clr) model = 0; else if (cpu_set && !camac_req) model = 1;
      chk(cpu_owns == model, "random flip-flop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
