// vc_arith: the correction-function arithmetic v_c = i * (g + f).
//
// g and f are 15-bit unsigned values; their sum is clamped to 15 bits (the
// document calls it the 15-bit sum; the clamp is this design's choice) and
// multiplied by the 12-bit current i into a 27-bit product. Normally the top
// 12 product bits go to the DAC. With skip3 set, the top 3 bits are dropped and
// the next 12 are used, giving full DAC range when i is only about 1/8 of full
// scale (injection); then a product whose top 3 bits are not zero overflows
// the DAC, which ovf reports (the DAC word is not clamped). Purely
// combinational.
module vc_arith #(
  parameter int IW = 12,
  parameter int YW = 15
) (
  input  logic [YW-1:0]   g,
  input  logic [YW-1:0]   f,
  input  logic [IW-1:0]   i,
  input  logic            skip3,
  output logic [YW-1:0]   sum,
  output logic            sat,
  output logic [IW+YW-1:0] prod,
  output logic [11:0]     dac,
  output logic            ovf
);
  logic [YW:0] raw;
  assign raw  = {1'b0, g} + {1'b0, f};
  assign sat  = raw[YW];
  assign sum  = sat ? '1 : raw[YW-1:0];
  assign prod = (IW+YW)'(i) * (IW+YW)'(sum);
  assign dac  = skip3 ? prod[IW+YW-4 -: 12] : prod[IW+YW-1 -: 12];
  assign ovf  = skip3 && (prod[IW+YW-1 -: 3] != 3'b000);
endmodule
