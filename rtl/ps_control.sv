// ps_control: on/off and reset outputs to the correction-coil power supply.
//
// A write from the host carries bit 0 = on and bit 1 = reset. The on bit is
// held until the next write; a reset bit starts a PSR_CYCLES-clock reset pulse
// (1 ms at 6 MHz by default). Both outputs are off after module reset. The
// on/off and reset functions follow the document; the bit assignment and the
// pulse length are this design's choices.
module ps_control #(
  parameter int PSR_CYCLES = 6000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [1:0] wdata,
  output logic       ps_on,
  output logic       ps_reset
);
  logic [$clog2(PSR_CYCLES+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps_on <= 1'b0;
      cnt   <= '0;
    end else begin
      if (we) ps_on <= wdata[0];
      if (we && wdata[1]) cnt <= PSR_CYCLES[$clog2(PSR_CYCLES+1)-1:0];
      else if (cnt != 0)  cnt <= cnt - 1'b1;
    end
  end

  assign ps_reset = (cnt != 0);
endmodule
