// tb_i_register: i is captured only at the 1 kHz sample strobe, after the
// two-clock synchroniser, and held between strobes.
module tb_i_register;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sample, valid;
  logic [11:0] i_in, i_out, held;
  int checks = 0, failures = 0;

  i_register #(.IW(12)) dut (.clk, .rst_n, .sample, .i_in, .i_out, .valid);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample = 0; i_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (valid) begin failures++; $display("FAIL valid before sample"); end
    for (int n = 0; n < 500; n++) begin
      i_in = 12'($urandom);
      repeat (3) @(negedge clk);      // through the synchroniser
      held = i_in;
      sample = 1; @(negedge clk); sample = 0;
      checks++;
      if (i_out !== held || !valid) begin failures++; $display("FAIL sample %0d: %h exp %h", n, i_out, held); end
      i_in = 12'($urandom);
      repeat (5) @(negedge clk);
      checks++;
      if (i_out !== held) begin failures++; $display("FAIL hold %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
