// buffer_memory: 256-byte communication buffer between Camac and the engine.
//
// Camac sees WORDS 16-bit words, the processor side sees 2*WORDS bytes of the
// same storage. Byte 2k is the low half of word k and byte 2k+1 the high half
// (this design's byte order). Both ports are synchronous: a read enable in one
// clock gives the data on the next, and the read register holds until the
// next read of that port. The arbiter guarantees that the two ports are not
// used in the same clock; an assertion checks it.
module buffer_memory #(
  parameter int WORDS = 128
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // Camac word port
  input  logic                       c_re,
  input  logic                       c_we,
  input  logic [$clog2(WORDS)-1:0]   c_addr,
  input  logic [15:0]                c_wdata,
  output logic [15:0]                c_rdata,
  // processor byte port
  input  logic                       p_re,
  input  logic                       p_we,
  input  logic [$clog2(WORDS):0]     p_addr,
  input  logic [7:0]                 p_wdata,
  output logic [7:0]                 p_rdata
);
  logic [7:0] lo [WORDS];
  logic [7:0] hi [WORDS];

  logic [$clog2(WORDS)-1:0] pw;
  assign pw = p_addr[$clog2(WORDS):1];

  always_ff @(posedge clk) begin
    if (c_we) begin
      lo[c_addr] <= c_wdata[7:0];
      hi[c_addr] <= c_wdata[15:8];
    end else if (p_we) begin
      if (p_addr[0]) hi[pw] <= p_wdata;
      else           lo[pw] <= p_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_rdata <= '0;
      p_rdata <= '0;
    end else begin
      if (c_re) c_rdata <= {hi[c_addr], lo[c_addr]};
      if (p_re) p_rdata <= p_addr[0] ? hi[pw] : lo[pw];
    end
  end

  a_one_port: assert property (@(posedge clk) disable iff (!rst_n) !((c_re || c_we) && (p_re || p_we)));
endmodule
