// buffer_arbiter: first-come first-served ownership of the shared buffer memory.
//
// The processor side owns the buffer through a control flip-flop that stays
// set until it clears it; Camac owns the buffer only for the one clock of each
// word access. A set attempt succeeds only if no Camac access is in progress
// in that clock; a failed attempt leaves the flip-flop reset, which the
// processor side sees by reading cpu_owns on the next clock. A Camac access
// while the flip-flop is set is refused (camac_grant low: the module answers
// no-Q and ignores the command). camac_grant is combinational in the clock of
// the request; cpu_owns is registered. The one-clock Camac tenure is this
// design's choice.
module buffer_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic cpu_set,
  input  logic cpu_clr,
  input  logic camac_req,
  output logic camac_grant,
  output logic cpu_owns
);
  assign camac_grant = camac_req && !cpu_owns;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      cpu_owns <= 1'b0;
    else if (cpu_clr)                cpu_owns <= 1'b0;
    else if (cpu_set && !camac_req)  cpu_owns <= 1'b1;
  end

  // Never both owners in the same clock
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(camac_grant && cpu_owns));
endmodule
