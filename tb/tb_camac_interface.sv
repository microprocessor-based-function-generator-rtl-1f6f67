// tb_camac_interface: each dataway command against its expected decode and
// response: F(20) loads the pointer, F(16)/F(0) access the buffer and advance
// the pointer only when granted, a refused access gives no-Q with X, F(1)
// returns the status word, F(17) writes the supply control, F(26)/F(24) set
// and clear the ramp enable, unknown codes, other subaddresses and cycles
// without N give X = 0.
module tb_camac_interface;
  import fg_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic n, s1, q, x, n_cycle, addr_load, addr_inc, buf_req, buf_grant, c_re, c_we, psc_we, ramp_en;
  logic [4:0] f;
  logic [3:0] a;
  logic [15:0] w, r, c_wdata, c_rdata, status_word;
  logic [6:0] addr_val;
  logic [1:0] psc_wdata;
  int checks = 0, failures = 0;

  camac_interface #(.AW(7)) dut (.clk, .rst_n, .n, .s1, .f, .a, .w, .r, .q, .x, .n_cycle,
    .addr_load, .addr_val, .addr_inc, .buf_req, .buf_grant, .c_re, .c_we, .c_wdata, .c_rdata,
    .status_word, .psc_we, .psc_wdata, .ramp_en);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one dataway cycle; strobe outputs are checked in the strobe clock,
  // responses on the next clock
  task automatic cyc(input logic nn, input logic [4:0] ff, input logic [3:0] aa, input logic [15:0] ww,
                     input logic grant, input bit exp_x, input bit exp_q);
    n = nn; s1 = 1; f = ff; a = aa; w = ww; buf_grant = grant;
    #1;
    chk(addr_load == (nn && aa == 0 && ff == F_LOAD_ADDR), "addr_load");
    chk(c_we == (nn && aa == 0 && ff == F_WRITE_BUF && grant), "c_we");
    chk(c_re == (nn && aa == 0 && ff == F_READ_BUF && grant), "c_re");
    chk(addr_inc == (nn && aa == 0 && (ff == F_READ_BUF || ff == F_WRITE_BUF) && grant), "addr_inc");
    chk(psc_we == (nn && aa == 0 && ff == F_WRITE_PSC), "psc_we");
    @(negedge clk);
    n = 0; s1 = 0; buf_grant = 0;
    #1;
    chk(x == exp_x, $sformatf("X for F(%0d)", ff));
    chk(q == exp_q, $sformatf("Q for F(%0d)", ff));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n = 0; s1 = 0; f = 0; a = 0; w = 0; buf_grant = 0; c_rdata = 16'hBEEF; status_word = 16'h1234;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cyc(1, F_LOAD_ADDR, 0, 16'h0055, 0, 1, 1);
    chk(addr_val == 7'h55, "address value from W");
    cyc(1, F_WRITE_BUF, 0, 16'hA5A5, 1, 1, 1);
    cyc(1, F_WRITE_BUF, 0, 16'hA5A5, 0, 1, 0);           // refused: no-Q
    cyc(1, F_READ_BUF, 0, 0, 1, 1, 1);
    chk(r == 16'hBEEF, "read data from buffer");
    c_rdata = 16'h0F0F; #1;
    chk(r == 16'h0F0F, "read lines follow the buffer read register");
    cyc(1, F_READ_BUF, 0, 0, 0, 1, 0);                   // refused read
    chk(r == 16'h0000, "refused read returns 0");
    cyc(1, F_READ_STATUS, 0, 0, 0, 1, 1);
    chk(r == 16'h1234, "status word");
    cyc(1, F_WRITE_PSC, 0, 16'h0003, 0, 1, 1);
    cyc(1, F_ENABLE, 0, 0, 0, 1, 1);
    chk(ramp_en, "ramp enabled");
    cyc(1, F_DISABLE, 0, 0, 0, 1, 1);
    chk(!ramp_en, "ramp disabled");
    cyc(1, 5'd9, 0, 0, 0, 0, 0);                         // unknown code
    cyc(1, F_WRITE_BUF, 4'd3, 0, 1, 0, 0);               // other subaddress
    cyc(0, F_ENABLE, 0, 0, 1, 0, 0);                     // no N: responses keep the last cycle's
    chk(!ramp_en, "no N, no enable");
    for (int k = 0; k < 300; k++) begin
      logic [4:0] ff;
      logic g;
      bit known;
      ff = 5'($urandom); g = 1'($urandom);
      known = ff inside {F_READ_BUF, F_WRITE_BUF, F_LOAD_ADDR, F_READ_STATUS, F_WRITE_PSC, F_DISABLE, F_ENABLE};
      cyc(1, ff, 0, 16'($urandom), g, known, known && ((ff == F_READ_BUF || ff == F_WRITE_BUF) ? g : 1'b1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
