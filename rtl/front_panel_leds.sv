// front_panel_leds: the three front-panel indicators.
//
// led_n lights for LED_CYCLES clocks after each Camac dataway cycle addressed
// to the module (the usual "N" light). led_ramp shows that the host has
// enabled the analog output. led_heartbeat toggles after every HB_LOOPS
// completed 1 kHz computations, so it blinks only while the engine is running.
// The three LEDs follow the document; the stretch and blink rate are this
// design's choices.
module front_panel_leds #(
  parameter int LED_CYCLES = 600000,
  parameter int HB_LOOPS   = 250
) (
  input  logic clk,
  input  logic rst_n,
  input  logic n_cycle,
  input  logic ramp_en,
  input  logic loop_done,
  output logic led_n,
  output logic led_ramp,
  output logic led_heartbeat
);
  logic [$clog2(LED_CYCLES+1)-1:0] ncnt;
  logic [$clog2(HB_LOOPS+1)-1:0]   hcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ncnt <= '0;
      hcnt <= '0;
      led_heartbeat <= 1'b0;
    end else begin
      if (n_cycle)        ncnt <= LED_CYCLES[$clog2(LED_CYCLES+1)-1:0];
      else if (ncnt != 0) ncnt <= ncnt - 1'b1;
      if (loop_done) begin
        if (hcnt == HB_LOOPS[$clog2(HB_LOOPS+1)-1:0] - 1'b1) begin
          hcnt <= '0;
          led_heartbeat <= !led_heartbeat;
        end else begin
          hcnt <= hcnt + 1'b1;
        end
      end
    end
  end

  assign led_n    = (ncnt != 0);
  assign led_ramp = ramp_en;
endmodule
