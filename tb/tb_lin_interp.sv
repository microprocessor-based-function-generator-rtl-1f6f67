// tb_lin_interp: random end points and offsets, including falling segments,
// x = 0 and full 16-bit segment lengths. The expected value
// y0 + sign(y1-y0) * floor(|y1-y0| * x / dx) is computed in the testbench;
// done must come exactly 32 clock edges after start (YW+XW+1).
module tb_lin_interp;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        start, done;
  logic [14:0] y0, y1, y;
  logic [15:0] x, dx;
  int checks = 0, failures = 0;

  lin_interp #(.YW(15), .XW(16)) dut (.clk, .rst_n, .start, .y0, .y1, .x, .dx, .y, .done);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [14:0] a, input logic [14:0] b, input logic [15:0] xx, input logic [15:0] d);
    longint mag, q, expv;
    int lat;
    y0 = a; y1 = b; x = xx; dx = d; start = 1;
    @(negedge clk);
    start = 0; lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    mag  = (b >= a) ? longint'(b) - longint'(a) : longint'(a) - longint'(b);
    q    = (mag * longint'(xx)) / longint'(d);
    expv = (b >= a) ? longint'(a) + q : longint'(a) - q;
    checks++;
    if (longint'(y) != expv) begin
      failures++; $display("FAIL y0=%0d y1=%0d x=%0d dx=%0d got %0d exp %0d", a, b, xx, d, y, expv);
    end
    checks++;
    // lat counts from the negedge before the start edge: 32 edges after it
    if (lat != 33) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    start = 0; y0 = 0; y1 = 0; x = 0; dx = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(15'd100, 15'd200, 16'd5, 16'd10);     // 150
    run(15'd200, 15'd100, 16'd3, 16'd10);     // 170
    run(15'd32767, 15'd0, 16'd65534, 16'd65535);
    run(15'd7, 15'd9000, 16'd0, 16'd17);
    for (int n = 0; n < 1500; n++) begin
      logic [15:0] d;
      d = 16'($urandom);
      if (d == 0) d = 1;
      run(15'($urandom), 15'($urandom), 16'($urandom % d), d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
