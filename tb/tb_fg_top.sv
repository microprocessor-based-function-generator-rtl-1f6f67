// tb_fg_top: end-to-end test of the function generator at its default
// parameters, with a 1 kHz tick every 6000 clocks (1 ms at 6 MHz).
//
// The host side loads g(i) and f(t) tables into the buffer over the dataway,
// reads them back, and steers the module with Tevatron-clock events in a
// pulsed cycle (NEW, START, run into a stop bit), a storage-mode sequence
// (STOP, READ, NEW, START), CONTINUE after STOP, a second g set switched in by
// DOUBLE VALUE, a table that runs to its end, the mode that drops the top
// three product bits (with overflow), and ramp disable. After every tick the
// DAC word and the engine's g and f are compared with a reference computed
// here from the tables: f as a function of the milliseconds f has run, g by
// locating i among the breakpoints, v_c = i*(g+f). READ results and ADC
// readings are checked through the buffer. The test also forces a no-Q
// (Camac access while the engine holds the buffer) and a failed buffer lock
// (engine attempt during a Camac access), ends with a Camac initialise, and
// counts every mechanism; one that
// never happened counts as a failure.
module tb_fg_top;
  import fg_pkg::*;
  localparam int MS = 6000;

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
    repeat (800) @(negedge clk);
    chk(dut.u_engine.f_val == 15'(f), $sformatf("f: got %0d exp %0d (t=%0d)", dut.u_engine.f_val, f, t_run));
    chk(dut.u_engine.g_val == 15'(g), $sformatf("g: got %0d exp %0d (i=%0d)", dut.u_engine.g_val, g, ival));
    chk(dac_code == (ramp_m ? 12'(vc) : 12'd0), $sformatf("dac: got %0d exp %0d", dac_code, vc));
    chk(dut.u_engine.f_running == running, "f running state");
    last_g = g; last_f = f; last_vc = vc; last_i = ival;
    repeat (MS - 806) @(negedge clk);
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

  // ---------------------------------------------------------------- monitors
  logic hb_q = 0, psr_q = 0;
  always @(posedge clk) begin
    if (dut.u_engine.lock_set && dut.buf_req) n_lock_retry++;
    if (led_heartbeat != hb_q) n_hb++;
    if (ps_reset && !psr_q) n_psreset++;
    hb_q <= led_heartbeat; psr_q <= ps_reset;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] rr;
    logic qq;
    int len;
    por_n = 0; camac_n = 0; camac_s1 = 0; camac_s2 = 0; camac_z = 0; camac_f = 0; camac_a = 0;
    camac_w = 0; tick_1khz = 0; tevent = 0; i_in = 0; ps_status = 10'h2A5;
    t_run = 0; running = 0; stopped_cmd = 0; gsel_m = 0; skip3_m = 0; ramp_m = 0;
    {n_noq, n_lock_retry, n_stopbit, n_fend, n_stop, n_cont, n_new, n_start, n_read,
     n_double, n_ginterp, n_gclamp, n_finterp, n_ovf, n_rampoff, n_hb, n_psreset, n_adc} = '0;
    for (int s = 0; s < 2; s++) for (int k = 0; k < NPTS; k++) begin gx[s][k] = 0; gy[s][k] = 0; sgx[s][k] = 0; sgy[s][k] = 0; end
    for (int k = 0; k < NPTS; k++) begin fy[k] = 0; sfy[k] = 0; fstop[k] = 0; sstop[k] = 0; end
    for (int k = 0; k < NSEG; k++) begin fdt[k] = 0; sdt[k] = 0; end
    repeat (5) @(negedge clk);
    por_n = 1;
    repeat (200) @(negedge clk);

    // status, supply control, ramp enable, N light
    camac_ok(F_READ_STATUS, 0, rr);
    chk(rr[9:0] == 10'h2A5, "status lines");
    chk(led_n, "N light after a dataway cycle");
    camac_ok(F_WRITE_PSC, 16'd1, rr);
    chk(ps_on && !ps_reset, "supply on");
    camac_ok(F_WRITE_PSC, 16'd3, rr);
    len = 0;
    while (ps_reset && len < 10000) begin @(negedge clk); len++; end
    chk(len >= 5999 && len <= 6000, $sformatf("supply reset pulse %0d clocks", len));
    camac_ok(F_READ_STATUS, 0, rr);
    chk(rr[11] && !rr[10], "status: on, ramp not enabled");
    camac_ok(F_ENABLE, 0, rr); ramp_m = 1;
    chk(led_ramp, "ramp LED");

    // table A: g set 0 and an f table with a stop bit at end point 3
    begin
      int xs[7] = '{200, 600, 1000, 1800, 2600, 3400, 4000};
      int ys[7] = '{1000, 3000, 2500, 8000, 12000, 9000, 15000};
      int dts[6] = '{5, 8, 3, 10, 6, 4};
      int fs[7] = '{500, 2500, 1200, 4000, 3000, 6000, 100};
      for (int k = 0; k < 7; k++) begin sgx[0][k] = xs[k]; sgy[0][k] = ys[k]; sfy[k] = fs[k]; end
      for (int k = 0; k < 6; k++) sdt[k] = dts[k];
      sstop[3] = 1;
    end
    load_buffer((1 << HDR_LOADG) | (1 << HDR_LOADF), 0);

    // NEW, with a Camac write attempted while the engine holds the buffer
    event_pulse(EV_NEW);
    repeat (30) @(negedge clk);
    camac(F_WRITE_BUF, 16'hDEAD, rr, qq);
    chk(!qq, "no-Q while the engine holds the buffer");
    if (!qq) n_noq++;
    camac_ok(F_READ_STATUS, 0, rr);
    chk(rr[14], "status: buffer held by the engine");
    repeat (966) @(negedge clk);
    camac_ok(F_READ_STATUS, 0, rr);
    chk(!rr[14], "status: buffer released");
    n_new++;
    gx[0] = sgx[0]; gy[0] = sgy[0]; fdt = sdt; fy = sfy; fstop = sstop;
    camac_ok(F_LOAD_ADDR, 16'd0, rr);
    for (int k = 0; k < BUF_WORDS; k++) begin
      camac_ok(F_READ_BUF, 16'd0, rr);
      chk(rr == words[k], "refused write left the buffer unchanged");
    end

    // pulsed cycle: f waits at its first value, then runs into the stop bit
    for (int n = 0; n < 4; n++) do_tick(int'($urandom % 4096));
    do_event(EV_START, 0);
    for (int n = 0; n < 22; n++) do_tick(int'($urandom % 4096));
    chk(!running, "stopped at the stop bit");
    do_tick(100);
    do_tick(4095);
    do_tick(1800);

    // STOP / CONTINUE
    do_event(EV_START, 0);
    for (int n = 0; n < 7; n++) do_tick(int'($urandom % 4096));
    do_event(EV_STOP, 0);
    for (int n = 0; n < 4; n++) do_tick(int'($urandom % 4096));
    do_event(EV_CONTINUE, 0);
    for (int n = 0; n < 5; n++) do_tick(int'($urandom % 4096));

    // READ, with the engine's lock attempt colliding with Camac reads
    do_tick(2222);
    @(negedge clk);
    tevent = NEV'(1) << EV_READ;
    camac_n = 1; camac_s1 = 1; camac_f = F_READ_BUF; camac_a = 0;
    @(negedge clk);
    tevent = '0;
    repeat (10) @(negedge clk);
    camac_n = 0; camac_s1 = 0;
    n_read++;
    repeat (1000) @(negedge clk);
    check_read(last_vc);

    // storage-mode sequence with a second g set
    begin
      int xs[3] = '{0, 2000, 4095};
      int ys[3] = '{20000, 10000, 5000};
      for (int k = 0; k < 3; k++) begin sgx[1][k] = xs[k]; sgy[1][k] = ys[k]; end
    end
    do_event(EV_STOP, 0);
    do_event(EV_READ, 0); n_read++;
    check_read(last_vc);
    load_buffer((1 << HDR_GSET) | (1 << HDR_LOADG), 1);
    do_event(EV_NEW, (1 << HDR_GSET) | (1 << HDR_LOADG));
    for (int n = 0; n < 3; n++) do_tick(int'($urandom % 4096));
    do_event(EV_DOUBLE, 0);
    for (int n = 0; n < 6; n++) do_tick(int'($urandom % 4096));
    do_event(EV_DOUBLE, 0);
    for (int n = 0; n < 3; n++) do_tick(int'($urandom % 4096));

    // table B: f without stop bits, runs to its end; top three bits dropped
    begin
      int dts[4] = '{3, 4, 2, 5};
      int fs[5] = '{300, 900, 200, 2000, 1500};
      for (int k = 0; k < NPTS; k++) begin sfy[k] = 0; sstop[k] = 0; end
      for (int k = 0; k < NSEG; k++) sdt[k] = 0;
      for (int k = 0; k < 4; k++) sdt[k] = dts[k];
      for (int k = 0; k < 5; k++) sfy[k] = fs[k];
    end
    load_buffer((1 << HDR_LOADF) | (1 << HDR_SKIP3), 0);
    do_event(EV_NEW, (1 << HDR_LOADF) | (1 << HDR_SKIP3));
    do_event(EV_START, 0);
    for (int n = 0; n < 18; n++) do_tick(300 + int'($urandom % 300));   // injection-level current
    do_tick(4000);                                                      // overflows the DAC
    camac_ok(F_READ_STATUS, 0, rr);
    chk(rr[13], "status: DAC overflow");
    chk(!running, "table ran to its end");

    // ramp disabled
    camac_ok(F_DISABLE, 0, rr); ramp_m = 0;
    do_tick(500);
    camac_ok(F_ENABLE, 0, rr); ramp_m = 1;

    // run on until the heartbeat has blinked
    while (n_hb < 1) do_tick(int'($urandom % 4096));
    camac_ok(F_READ_STATUS, 0, rr);

    // Camac initialise (Z with S2) resets the module
    @(negedge clk);
    camac_z = 1; camac_s2 = 1;
    @(negedge clk);
    camac_z = 0; camac_s2 = 0;
    repeat (100) @(negedge clk);
    chk(!led_ramp && !ps_on && dac_code == 12'd0, "Camac Z*S2 resets ramp enable, supply and DAC");

    $display("mechanisms: noq=%0d lock_retry=%0d stopbit=%0d fend=%0d stop=%0d cont=%0d new=%0d start=%0d read=%0d double=%0d",
             n_noq, n_lock_retry, n_stopbit, n_fend, n_stop, n_cont, n_new, n_start, n_read, n_double);
    $display("            g_interp=%0d g_clamp=%0d f_interp=%0d ovf=%0d ramp_off=%0d heartbeat=%0d ps_reset=%0d adc=%0d",
             n_ginterp, n_gclamp, n_finterp, n_ovf, n_rampoff, n_hb, n_psreset, n_adc);
    chk(n_noq > 0, "mechanism no-Q");
    chk(n_lock_retry > 0, "mechanism failed lock attempt");
    chk(n_stopbit > 0, "mechanism stop bit");
    chk(n_fend > 0, "mechanism end of f table");
    chk(n_stop > 0 && n_cont > 0, "mechanism STOP/CONTINUE");
    chk(n_new > 0 && n_start > 0 && n_read > 0 && n_double > 0, "mechanism NEW/START/READ/DOUBLE");
    chk(n_ginterp > 0 && n_gclamp > 0 && n_finterp > 0, "mechanism interpolation and clamping");
    chk(n_ovf > 0, "mechanism DAC overflow");
    chk(n_rampoff > 0, "mechanism ramp disabled");
    chk(n_hb > 0, "mechanism heartbeat");
    chk(n_psreset > 0, "mechanism supply reset");
    chk(n_adc > 0, "mechanism ADC readings");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
