// interrupt_ctrl: latches the Tevatron-clock event interrupts.
//
// Each of the NEV event strobes (STOP, CONTINUE, NEW, START, READ, DOUBLE
// VALUE, numbered as in fg_pkg) sets a pending bit unless its mask bit is set.
// The lowest-numbered pending event is presented on id with a Z-80 mode-2
// style vector VEC_BASE + 2*id; ack clears that bit, so events are served one
// at a time and in order of priority. All events are masked after reset until
// the engine writes the mask. Masking follows the document; the priority
// order, vector numbers and the reset mask are this design's choices.
module interrupt_ctrl
  import fg_pkg::*;
#(
  parameter logic [7:0] VEC_BASE = 8'h40
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NEV-1:0] ev,
  input  logic           mask_we,
  input  logic [NEV-1:0] mask_in,
  input  logic           ack,
  output logic           irq,
  output logic [2:0]     id,
  output logic [7:0]     vector,
  output logic [NEV-1:0] pending
);
  logic [NEV-1:0] mask;
  logic [NEV-1:0] clr;

  always_comb begin
    id = '0;
    for (int k = NEV - 1; k >= 0; k--)
      if (pending[k]) id = 3'(k);
  end
  assign irq    = |pending;
  assign vector = VEC_BASE + {4'd0, id, 1'b0};
  assign clr    = ack ? (NEV'(1) << id) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask    <= '1;
      pending <= '0;
    end else begin
      if (mask_we) mask <= mask_in;
      pending <= (pending & ~clr) | (ev & ~mask);
    end
  end

  a_ack_valid: assert property (@(posedge clk) disable iff (!rst_n) ack |-> irq);
endmodule
