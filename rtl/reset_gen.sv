// reset_gen: the module reset.
//
// Reset is asserted at power-on (por_n low, asynchronous) and by the Camac
// initialise command (Z with strobe S2), and released RESET_CYCLES+1 clocks
// after the last of these, on a clock edge. The document shows a reset block
// fed from the Camac bus; the use of Z*S2 and the stretch are this design's.
module reset_gen #(
  parameter int RESET_CYCLES = 64
) (
  input  logic clk,
  input  logic por_n,
  input  logic camac_z,
  input  logic camac_s2,
  output logic rst_n
);
  logic [$clog2(RESET_CYCLES+1)-1:0] cnt;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      cnt   <= RESET_CYCLES[$clog2(RESET_CYCLES+1)-1:0];
      rst_n <= 1'b0;
    end else begin
      if (camac_z && camac_s2) cnt <= RESET_CYCLES[$clog2(RESET_CYCLES+1)-1:0];
      else if (cnt != 0)       cnt <= cnt - 1'b1;
      rst_n <= (cnt == 0) && !(camac_z && camac_s2);
    end
  end
endmodule
