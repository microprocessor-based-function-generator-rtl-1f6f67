// lin_interp: linear interpolation between two curve end points.
//
// Computes y = y0 + (y1 - y0) * x / dx for 0 <= x < dx, the value of a
// piecewise-linear curve at offset x into a segment of length dx. Used for
// both g(i) (x = i - i_k) and f(t) (x = ms elapsed in the segment). The
// magnitude |y1-y0| * x (YW+XW bits) is divided by dx with a restoring
// divider, one quotient bit per clock, and the quotient is added to or taken
// from y0, so the result truncates toward y0. The document asks only for
// linear interpolation; the bit-serial divider is this design's choice.
// Timing: start is sampled on a clock edge; done is high for one clock,
// YW+XW+1 edges later, with y valid from then until the next start.
module lin_interp #(
  parameter int YW = 15,
  parameter int XW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [YW-1:0] y0,
  input  logic [YW-1:0] y1,
  input  logic [XW-1:0] x,
  input  logic [XW-1:0] dx,
  output logic [YW-1:0] y,
  output logic          done
);
  localparam int NB = YW + XW;

  logic            busy, neg;
  logic [$clog2(NB+1)-1:0] cnt;
  logic [NB-1:0]   num;      // dividend, becomes the quotient
  logic [XW:0]     rem;
  logic [XW-1:0]   div;
  logic [YW-1:0]   base;
  logic [YW-1:0]   mag;
  logic [XW:0]     rem_sh;

  assign mag    = (y1 < y0) ? (y0 - y1) : (y1 - y0);
  assign rem_sh = {rem[XW-1:0], num[NB-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; neg <= 1'b0; cnt <= '0;
      num <= '0; rem <= '0; div <= '0; base <= '0; y <= '0;
    end else if (start) begin
      busy <= 1'b1;
      done <= 1'b0;
      neg  <= (y1 < y0);
      num  <= NB'(mag) * NB'(x);
      rem  <= '0;
      div  <= dx;
      base <= y0;
      cnt  <= NB[$clog2(NB+1)-1:0];
    end else if (busy) begin
      if (cnt != 0) begin
        if (rem_sh >= {1'b0, div}) begin
          rem <= rem_sh - {1'b0, div};
          num <= {num[NB-2:0], 1'b1};
        end else begin
          rem <= rem_sh;
          num <= {num[NB-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
      end else begin
        y    <= neg ? base - num[YW-1:0] : base + num[YW-1:0];
        done <= 1'b1;
        busy <= 1'b0;
      end
    end else begin
      done <= 1'b0;
    end
  end
endmodule
