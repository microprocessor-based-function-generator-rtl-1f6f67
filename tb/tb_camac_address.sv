// tb_camac_address: random loads and increments of the buffer address pointer
// against a reference count; checks load priority and wrap from 127 to 0.
module tb_camac_address;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, inc;
  logic [6:0] load_val, addr;
  int checks = 0, failures = 0;
  int unsigned model;

  camac_address #(.AW(7)) dut (.clk, .rst_n, .load, .load_val, .inc, .addr);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; inc = 0; load_val = 0; model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (addr !== 7'd0) begin failures++; $display("FAIL reset addr=%0d", addr); end
    for (int n = 0; n < 1000; n++) begin
      load = ($urandom % 8) == 0;
      inc  = ($urandom % 2) == 0;
      load_val = 7'($urandom);
      if (n == 500) begin load = 1; load_val = 7'd126; end
      @(negedge clk);
      if (load) model = load_val;
      else if (inc) model = (model + 1) % 128;
      checks++;
      if (addr !== 7'(model)) begin failures++; $display("FAIL n=%0d addr=%0d exp=%0d", n, addr, model); end
    end
    // explicit wrap
    load = 1; load_val = 7'd127; inc = 0; @(negedge clk);
    load = 0; inc = 1; @(negedge clk);
    checks++; if (addr !== 7'd0) begin failures++; $display("FAIL wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
