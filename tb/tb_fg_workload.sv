// tb_fg_workload: the largest tables the module takes, run to completion.
//
// Both g sets hold all 32 breakpoints, and the f table all 31 segments, one of
// them the longest possible (65535 ms). f is started and run through every
// segment to its end: about 65,900 ticks, spaced 400 clocks apart so that the
// simulation stays short (the engine needs under 200 clocks per tick; at
// 6 MHz a tick comes every 6000 clocks). DOUBLE VALUE switches g sets midway.
// Every tick the engine's f and g and the DAC word are compared with a
// reference computed from the tables, and the test checks that every segment
// was passed, that g was interpolated in every one of the 31 segments of both
// sets, and that the long segment ran its full length.
module tb_fg_workload;
  import fg_pkg::*;
  localparam int MS = 400;   // tick spacing; the engine needs under 200 clocks per tick

  logic clk = 0;
  always #5 clk = ~clk;

  logic por_n, camac_n, camac_s1, camac_s2, camac_z, camac_q, camac_x;
  logic [4:0] camac_f;
  logic [3:0] camac_a;
  logic [15:0] camac_w, camac_r;
  logic tick_1khz;
  logic [NEV-1:0] tevent;
  logic [11:0] i_in, dac_code, adc_data;
  logic [9:0] ps_status;
  logic ps_on, ps_reset, adc_sel, adc_start, adc_busy, led_n, led_ramp, led_heartbeat;
  logic [11:0] adc_ch1 = 12'h321;

  fg_top dut (
    .clk, .por_n, .camac_n, .camac_s1, .camac_s2, .camac_z, .camac_f, .camac_a, .camac_w,
    .camac_r, .camac_q, .camac_x, .tick_1khz, .tevent, .i_in, .ps_status, .ps_on, .ps_reset,
    .dac_code, .adc_sel, .adc_start, .adc_busy, .adc_data, .led_n, .led_ramp, .led_heartbeat
  );

  adc_model #(.CONV(20)) u_adc (
    .clk, .start(adc_start), .sel(adc_sel), .ch0(dac_code), .ch1(adc_ch1), .busy(adc_busy), .data(adc_data)
  );

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- tables
  // staged (what the host writes) and active (what the module copied)
  int sgx[2][NPTS], sgy[2][NPTS], sdt[NSEG], sfy[NPTS]; bit sstop[NPTS];
  int gx[2][NPTS], gy[2][NPTS], fdt[NSEG], fy[NPTS]; bit fstop[NPTS];
  logic [15:0] words [BUF_WORDS];

  // model state
  int  t_run; bit running, stopped_cmd; int gsel_m; bit skip3_m, ramp_m;
  int  last_g, last_f, last_vc, last_i;

  // mechanism counters
  int n_noq, n_lock_retry, n_stopbit, n_fend, n_stop, n_cont, n_new, n_start, n_read,
      n_double, n_ginterp, n_gclamp, n_finterp, n_ovf, n_rampoff, n_hb, n_psreset, n_adc;

  function automatic int interp(int y0, int y1, int x, int dx);
    longint mag, q;
    mag = (y1 >= y0) ? y1 - y0 : y0 - y1;
    q = (mag * x) / dx;
    return (y1 >= y0) ? y0 + int'(q) : y0 - int'(q);
  endfunction

  function automatic int f_last();
    for (int k = 0; k < NSEG; k++) if (fdt[k] == 0) return k;
    return NSEG;
  endfunction

  function automatic int cum(int p);
    int s = 0;
    for (int k = 0; k < p; k++) s += fdt[k];
    return s;
  endfunction

  function automatic int stop_time();
    int l = f_last();
    for (int p = 1; p < l; p++) if (fstop[p]) return cum(p);
    return cum(l);
  endfunction

  function automatic int f_ref(int t, output bit is_interp);
    int l = f_last();
    is_interp = 0;
    for (int k = 0; k < l; k++)
      if (t >= cum(k) && t < cum(k + 1)) begin
        if (t == cum(k)) return fy[k];
        is_interp = 1;
        return interp(fy[k], fy[k + 1], t - cum(k), fdt[k]);
      end
    return fy[l];
  endfunction

  function automatic int g_ref(int s, int i, output bit is_interp);
    int last = 0, k = 0;
    while (last + 1 < NPTS && gx[s][last + 1] > gx[s][last]) last++;
    for (int j = 0; j <= last; j++) if (gx[s][j] <= i) k = j;
    is_interp = !(i <= gx[s][k] || k == last);
    if (!is_interp) return gy[s][k];
    return interp(gy[s][k], gy[s][k + 1], i - gx[s][k], gx[s][k + 1] - gx[s][k]);
  endfunction

  // ---------------------------------------------------------------- dataway
  task automatic camac(input logic [4:0] ff, input logic [15:0] ww, output logic [15:0] rr, output logic qq);
    @(negedge clk);
    camac_n = 1; camac_s1 = 1; camac_f = ff; camac_a = 0; camac_w = ww;
    @(negedge clk);
    camac_n = 0; camac_s1 = 0;
    #1;
    rr = camac_r; qq = camac_q;
    chk(camac_x, $sformatf("X for F(%0d)", ff));
  endtask

  task automatic camac_ok(input logic [4:0] ff, input logic [15:0] ww, output logic [15:0] rr);
    logic qq;
    camac(ff, ww, rr, qq);
    chk(qq, $sformatf("Q for F(%0d)", ff));
  endtask

  task automatic load_buffer(input int hdr, input int s);
    logic [15:0] rr;
    words[BUF_HDR] = 16'(hdr);
    for (int k = 0; k < NPTS; k++) begin
      words[BUF_GX + k] = 16'(sgx[s][k]);
      words[BUF_GY + k] = 16'(sgy[s][k]);
      words[BUF_FY + k] = 16'(sfy[k]) | (sstop[k] ? 16'h8000 : 16'h0);
    end
    for (int k = 0; k < NSEG; k++) words[BUF_FDT + k] = 16'(sdt[k]);
    camac_ok(F_LOAD_ADDR, 16'd0, rr);
    for (int k = 0; k < BUF_WORDS; k++) camac_ok(F_WRITE_BUF, words[k], rr);
    camac_ok(F_LOAD_ADDR, 16'd0, rr);
    for (int k = 0; k < BUF_WORDS; k++) begin
      camac_ok(F_READ_BUF, 16'd0, rr);
      chk(rr == words[k], $sformatf("buffer read-back word %0d", k));
    end
  endtask

  // ---------------------------------------------------------------- events
  task automatic event_pulse(input ev_e e);
    @(negedge clk);
    tevent = NEV'(1) << e;
    @(negedge clk);
    tevent = '0;
  endtask

  task automatic do_event(input ev_e e, input int hdr);
    event_pulse(e);
    case (e)
      EV_STOP:     begin n_stop++; if (running) begin running = 0; stopped_cmd = 1; end end
      EV_CONTINUE: begin n_cont++; if (stopped_cmd) begin running = 1; stopped_cmd = 0; end end
      EV_START:    begin n_start++; t_run = 0; running = 1; stopped_cmd = 0; end
      EV_DOUBLE:   begin n_double++; gsel_m = 1 - gsel_m; end
      EV_NEW: begin
        n_new++;
        if (hdr[HDR_LOADG]) begin
          int s = hdr[HDR_GSET];
          gx[s] = sgx[s]; gy[s] = sgy[s];
        end
        if (hdr[HDR_LOADF]) begin
          fdt = sdt; fy = sfy; fstop = sstop;
          t_run = 0; running = 0; stopped_cmd = 0;
        end
        skip3_m = hdr[HDR_SKIP3];
      end
      default: ;
    endcase
    repeat (1000) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- ticks
  task automatic do_tick(input int ival);
    bit gi, fi;
    int g, f, s;
    longint p;
    int vc;
    i_in = 12'(ival);
    repeat (5) @(negedge clk);
    tick_1khz = 1;
    @(negedge clk);
    tick_1khz = 0;
    if (running) begin
      int st;
      st = stop_time();
      t_run++;
      if (t_run >= st) begin
        t_run = st; running = 0;
        if (st == cum(f_last())) n_fend++; else n_stopbit++;
      end
    end
    f = f_ref(t_run, fi);
    g = g_ref(gsel_m, ival, gi);
    if (gi) n_ginterp++; else n_gclamp++;
    if (fi) n_finterp++;
    s = g + f; if (s > 32767) s = 32767;
    p = longint'(s) * ival;
    vc = skip3_m ? int'((p >> 12) & 'hfff) : int'((p >> 15) & 'hfff);
    if (skip3_m && (p >> 24) != 0) n_ovf++;
    if (!ramp_m) n_rampoff++;
    repeat (350) @(negedge clk);
    chk(dut.u_engine.f_val == 15'(f), $sformatf("f: got %0d exp %0d (t=%0d)", dut.u_engine.f_val, f, t_run));
    chk(dut.u_engine.g_val == 15'(g), $sformatf("g: got %0d exp %0d (i=%0d)", dut.u_engine.g_val, g, ival));
    chk(dac_code == (ramp_m ? 12'(vc) : 12'd0), $sformatf("dac: got %0d exp %0d", dac_code, vc));
    chk(dut.u_engine.f_running == running, "f running state");
    last_g = g; last_f = f; last_vc = vc; last_i = ival;
    repeat (MS - 356) @(negedge clk);
  endtask

  task automatic check_read(input int adc0);
    logic [15:0] rr;
    camac_ok(F_LOAD_ADDR, 16'd0, rr);
    camac_ok(F_READ_BUF, 0, rr); chk(rr == 16'(last_g), "READ g");
    camac_ok(F_READ_BUF, 0, rr); chk(rr == 16'(last_f), "READ f");
    camac_ok(F_READ_BUF, 0, rr); chk(rr == 16'(last_vc), "READ v_c");
    camac_ok(F_READ_BUF, 0, rr); chk(rr == 16'(last_i), "READ i");
    camac_ok(F_READ_BUF, 0, rr); chk(rr == 16'(adc0), "READ adc ch0"); n_adc++;
    camac_ok(F_READ_BUF, 0, rr); chk(rr == 16'(adc_ch1), "READ adc ch1"); n_adc++;
  endtask


  int seg_seen [NSEG];
  int gseg_seen [2][NSEG];

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rr;
    int total, ticks;
    por_n = 0; camac_n = 0; camac_s1 = 0; camac_s2 = 0; camac_z = 0; camac_f = 0; camac_a = 0;
    camac_w = 0; tick_1khz = 0; tevent = 0; i_in = 0; ps_status = 10'h000;
    t_run = 0; running = 0; stopped_cmd = 0; gsel_m = 0; skip3_m = 0; ramp_m = 0;
    {n_noq, n_lock_retry, n_stopbit, n_fend, n_stop, n_cont, n_new, n_start, n_read,
     n_double, n_ginterp, n_gclamp, n_finterp, n_ovf, n_rampoff, n_hb, n_psreset, n_adc} = '0;
    for (int k = 0; k < NSEG; k++) begin seg_seen[k] = 0; gseg_seen[0][k] = 0; gseg_seen[1][k] = 0; end
    // full tables
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < NPTS; k++) begin
        sgx[s][k] = 20 + k * 128 + int'($urandom % 60);
        sgy[s][k] = int'($urandom % 16384);
        gx[s][k] = 0; gy[s][k] = 0;
      end
    for (int k = 0; k < NSEG; k++) begin sdt[k] = 1 + int'($urandom % 20); fdt[k] = 0; end
    sdt[10] = 65535;
    for (int k = 0; k < NPTS; k++) begin sfy[k] = int'($urandom % 16384); sstop[k] = 0; fy[k] = 0; fstop[k] = 0; end
    repeat (100) @(negedge clk);
    por_n = 1;
    repeat (200) @(negedge clk);
    camac_ok(F_ENABLE, 0, rr); ramp_m = 1;

    load_buffer((1 << HDR_LOADG) | (1 << HDR_LOADF), 0);
    do_event(EV_NEW, (1 << HDR_LOADG) | (1 << HDR_LOADF));
    load_buffer((1 << HDR_GSET) | (1 << HDR_LOADG), 1);
    do_event(EV_NEW, (1 << HDR_GSET) | (1 << HDR_LOADG));
    do_event(EV_START, 0);
    total = cum(NSEG);
    ticks = 0;
    while (running && ticks < total + 10) begin
      int ival;
      ival = int'($urandom % 4096);
      do_tick(ival);
      ticks++;
      for (int k = 0; k < NSEG; k++) if (t_run >= cum(k) && t_run < cum(k + 1)) seg_seen[k]++;
      for (int k = 0; k < NSEG; k++) if (ival > gx[gsel_m][k] && ival < gx[gsel_m][k + 1]) gseg_seen[gsel_m][k]++;
      if (ticks == total / 2) do_event(EV_DOUBLE, 0);
    end
    chk(!running && t_run == total, $sformatf("f ran to its end: t=%0d of %0d ms", t_run, total));
    chk(ticks == total, $sformatf("one tick per ms of table: %0d ticks", ticks));
    chk(dut.u_engine.f_val == 15'(fy[NSEG]), "f ends at the last end point");
    for (int k = 0; k < NSEG; k++) begin
      chk(seg_seen[k] > 0, $sformatf("f segment %0d visited", k));
      chk(gseg_seen[0][k] > 0 && gseg_seen[1][k] > 0, $sformatf("g segment %0d interpolated in both sets", k));
    end
    chk(seg_seen[10] == 65535, "longest segment ran 65535 ms");
    chk(n_double == 1, "g set switched");
    $display("ticks=%0d f_interp=%0d g_interp=%0d", ticks, n_finterp, n_ginterp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
