// i_register: samples the main dipole current i once per millisecond.
//
// The 12-bit digital current arrives on the rear connector asynchronously to
// the module clock. It passes a two-flop synchroniser and is captured on each
// 1 kHz tick, so one whole computation of v_c uses one consistent value.
// i_out changes on the clock edge that samples the tick; valid rises with the
// first sample. The synchroniser is this design's addition.
module i_register #(
  parameter int IW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample,
  input  logic [IW-1:0] i_in,
  output logic [IW-1:0] i_out,
  output logic          valid
);
  logic [IW-1:0] s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; i_out <= '0; valid <= 1'b0;
    end else begin
      s1 <= i_in;
      s2 <= s1;
      if (sample) begin
        i_out <= s2;
        valid <= 1'b1;
      end
    end
  end
endmodule
