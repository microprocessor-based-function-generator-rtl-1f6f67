// tb_vc_arith: v_c = i*(g+f) in both output modes. Reference: the 15-bit sum
// clamped at 32767, the 27-bit product, DAC word = product bits 26:15 or, with
// the top three bits dropped, bits 23:12; overflow when those three bits are
// not zero. Includes the injection case (9-bit i) where normal mode leaves
// three leading zeros.
module tb_vc_arith;
  logic [14:0] g, f, sum;
  logic [11:0] i, dac;
  logic        skip3, sat, ovf;
  logic [26:0] prod;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  vc_arith #(.IW(12), .YW(15)) dut (.g, .f, .i, .skip3, .sum, .sat, .prod, .dac, .ovf);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int gg, input int ff, input int ii, input bit s3);
    longint s, p;
    int expd;
    bit expo;
    g = 15'(gg); f = 15'(ff); i = 12'(ii); skip3 = s3;
    #1;
    s = gg + ff; if (s > 32767) s = 32767;
    p = s * ii;
    expd = s3 ? int'((p >> 12) & 'hfff) : int'((p >> 15) & 'hfff);
    expo = s3 && ((p >> 24) != 0);
    checks++;
    if (dac != 12'(expd) || ovf != expo || prod != 27'(p)) begin
      failures++; $display("FAIL g=%0d f=%0d i=%0d s3=%0d dac=%0d exp=%0d ovf=%0d", gg, ff, ii, s3, dac, expd, ovf);
    end
  endtask

  initial begin
    try(32767, 0, 4095, 0);
    try(20000, 20000, 4095, 0);  // clamped sum
    try(16000, 16000, 511, 0);   // injection, normal: three leading zeros
    try(16000, 16000, 511, 1);   // injection, top bits dropped
    try(16000, 16000, 4095, 1);  // overflow
    for (int n = 0; n < 5000; n++)
      try(int'($urandom % 32768), int'($urandom % 32768), int'($urandom % 4096), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
