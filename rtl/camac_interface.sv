// camac_interface: the module's slave logic on the Camac dataway.
//
// A dataway command is modelled as one clock with the station line N and the
// strobe S1 high, carrying function code F, subaddress A and write data W.
// Commands (subaddress 0):
//   F(0)  read the buffer word at the address pointer, then advance it
//   F(16) write W to the buffer word at the address pointer, then advance it
//   F(20) load the address pointer from W
//   F(1)  read the status word          F(17) write P.S. control (W[1:0])
//   F(24) disable the ramp              F(26) enable the ramp
// A buffer access while the engine holds the buffer is ignored and answered
// with Q = 0 (no-Q); every other accepted command answers Q = 1. X = 1 for a
// recognised command. Q, X and the read lines R are valid from the clock after
// the strobe and are held until the next strobe. F(0), F(16), F(20) and the
// no-Q rule follow the document; the other codes and the timing are this
// design's choices.
module camac_interface
  import fg_pkg::*;
#(
  parameter int AW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  // dataway
  input  logic          n,
  input  logic          s1,
  input  logic [4:0]    f,
  input  logic [3:0]    a,
  input  logic [15:0]   w,
  output logic [15:0]   r,
  output logic          q,
  output logic          x,
  output logic          n_cycle,
  // buffer address pointer
  output logic          addr_load,
  output logic [AW-1:0] addr_val,
  output logic          addr_inc,
  // arbitration
  output logic          buf_req,
  input  logic          buf_grant,
  // buffer word port
  output logic          c_re,
  output logic          c_we,
  output logic [15:0]   c_wdata,
  input  logic [15:0]   c_rdata,
  // module registers
  input  logic [15:0]   status_word,
  output logic          psc_we,
  output logic [1:0]    psc_wdata,
  output logic          ramp_en
);
  logic cmd, is_rd, is_wr, known;
  logic r_from_buf;
  logic [15:0] r_hold;

  assign n_cycle = n && s1;
  assign cmd     = n_cycle && (a == 4'd0);
  assign is_rd   = (f == F_READ_BUF);
  assign is_wr   = (f == F_WRITE_BUF);
  assign known   = is_rd || is_wr || f == F_LOAD_ADDR || f == F_READ_STATUS ||
                   f == F_WRITE_PSC || f == F_DISABLE || f == F_ENABLE;

  assign buf_req   = cmd && (is_rd || is_wr);
  assign c_re      = buf_req && is_rd && buf_grant;
  assign c_we      = buf_req && is_wr && buf_grant;
  assign c_wdata   = w;
  assign addr_inc  = buf_req && buf_grant;
  assign addr_load = cmd && (f == F_LOAD_ADDR);
  assign addr_val  = w[AW-1:0];
  assign psc_we    = cmd && (f == F_WRITE_PSC);
  assign psc_wdata = w[1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= 1'b0; x <= 1'b0; ramp_en <= 1'b0;
      r_from_buf <= 1'b0; r_hold <= '0;
    end else if (n_cycle) begin
      x <= cmd && known;
      q <= cmd && known && (buf_req ? buf_grant : 1'b1);
      r_from_buf <= c_re;
      if (cmd && f == F_READ_STATUS) r_hold <= status_word;
      else if (!c_re)                r_hold <= '0;
      if (cmd && f == F_ENABLE)  ramp_en <= 1'b1;
      if (cmd && f == F_DISABLE) ramp_en <= 1'b0;
    end
  end

  assign r = r_from_buf ? c_rdata : r_hold;
endmodule
