// adc_model: behavioural model of the 12-bit ADC with its two-input analog
// multiplexer, for simulation only. A one-clock start begins a conversion of
// the channel chosen by sel (0: monitor of the analog output, 1: supply
// current signal); busy is high for CONV clocks and data then holds the
// channel's value, given here directly as a 12-bit number.
module adc_model #(
  parameter int CONV = 20
) (
  input  logic        clk,
  input  logic        start,
  input  logic        sel,
  input  logic [11:0] ch0,
  input  logic [11:0] ch1,
  output logic        busy,
  output logic [11:0] data
);
  int cnt = 0;
  logic chan = 1'b0;
  initial begin busy = 1'b0; data = '0; end
  always_ff @(posedge clk) begin
    if (start) begin
      busy <= 1'b1; cnt <= CONV; chan <= sel;
    end else if (cnt > 1) begin
      cnt <= cnt - 1;
    end else if (busy) begin
      busy <= 1'b0; cnt <= 0;
      data <= chan ? ch1 : ch0;
    end
  end
endmodule
