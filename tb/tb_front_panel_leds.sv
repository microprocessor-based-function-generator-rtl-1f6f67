// tb_front_panel_leds: the N light stays on LED_CYCLES clocks (run with 8)
// after a dataway cycle, the ramp LED follows the enable, the heartbeat
// toggles after every HB_LOOPS (run with 3) loop completions and not without.
module tb_front_panel_leds;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic n_cycle, ramp_en, loop_done, led_n, led_ramp, led_heartbeat;
  int checks = 0, failures = 0;

  front_panel_leds #(.LED_CYCLES(8), .HB_LOOPS(3)) dut (.clk, .rst_n, .n_cycle, .ramp_en, .loop_done,
                                                      .led_n, .led_ramp, .led_heartbeat);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_cycle = 0; ramp_en = 0; loop_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!led_n && !led_ramp && !led_heartbeat, "dark after reset");
    n_cycle = 1; @(negedge clk); n_cycle = 0;
    for (int k = 0; k < 7; k++) begin chk(led_n, "N light held"); @(negedge clk); end
    chk(led_n, "N light last clock"); @(negedge clk);
    chk(!led_n, "N light off after 8");
    ramp_en = 1; #1; chk(led_ramp, "ramp LED"); ramp_en = 0; #1; chk(!led_ramp, "ramp LED off");
    for (int n = 1; n <= 12; n++) begin
      loop_done = 1; @(negedge clk); loop_done = 0;
      repeat (2) @(negedge clk);
      chk(led_heartbeat == ((n / 3) % 2 == 1), "heartbeat");
    end
    repeat (20) @(negedge clk);
    chk(led_heartbeat == 1'b0, "no toggle without loops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
