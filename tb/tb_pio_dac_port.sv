// tb_pio_dac_port: the DAC word changes only when the high part (port B) is
// written, combines the last low byte with the high nibble, and reads 0 while
// the ramp is not enabled.
module tb_pio_dac_port;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic a_we, b_we, ramp_en;
  logic [7:0] wdata;
  logic [11:0] dac_code, expv;
  int checks = 0, failures = 0;

  pio_dac_port dut (.clk, .rst_n, .a_we, .b_we, .wdata, .ramp_en, .dac_code);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_we = 0; wdata = 0; ramp_en = 1; expv = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      logic [7:0] lo, hi;
      lo = 8'($urandom); hi = 8'($urandom);
      ramp_en = ($urandom % 4) != 0;
      a_we = 1; wdata = lo; @(negedge clk); a_we = 0;
      chk(dac_code == (ramp_en ? expv : 12'd0), "unchanged after low byte");
      b_we = 1; wdata = hi; @(negedge clk); b_we = 0;
      expv = {hi[3:0], lo};
      chk(dac_code == (ramp_en ? expv : 12'd0), "updated after high nibble");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
