// camac_address: the auto-incrementing buffer address pointer used by Camac.
//
// The host loads a starting word address once (F(20)); every accepted buffer
// read or write then moves the pointer to the next word, so a block transfer
// needs no further addressing. The pointer is AW bits wide (128 words), wraps
// from the last word to word 0 and is cleared by reset. Wrap and reset value
// are this design's choice. load has priority over inc. addr changes on the
// clock edge that ends the cycle of load or inc.
module camac_address #(
  parameter int AW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] load_val,
  input  logic          inc,
  output logic [AW-1:0] addr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    addr <= '0;
    else if (load) addr <= load_val;
    else if (inc)  addr <= addr + 1'b1;
  end
endmodule
