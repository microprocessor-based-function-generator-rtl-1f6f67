// param_ram: the 1 kbyte read/write memory of the function generator.
//
// It holds the two g(i) parameter sets and the f(t) parameter set copied from
// the buffer memory by a NEW event. Organised as WORDS x 16 bits (512 x 16 =
// 1 kbyte); the document gives only the size, the word organisation is this
// design's. Single port, synchronous write, synchronous read with one clock
// latency.
module param_ram #(
  parameter int WORDS = 512
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [15:0]              wdata,
  output logic [15:0]              rdata
);
  logic [15:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
