// fg_engine: computes the correction function once per millisecond and
// serves the Tevatron-clock events.
//
// In the original module this work is done by the program of the on-board
// microprocessor; here it is a state machine that does what that program is
// described to do.
//
// Every 1 kHz tick (the real-time interrupt, which has priority over events):
//   1. f(t): if f is running, one more ms elapses in the current segment; when
//      the segment's length dt is used up the next segment begins. f stops at
//      an end point whose stop bit (bit 15) is set, at the last end point, or
//      at a segment of length 0. f = interpolation of the end points at the
//      elapsed time.
//   2. g(i): the sampled current i is located among the i breakpoints of the
//      active g set (the breakpoints end at the first one not above its
//      predecessor) and g is interpolated; outside the breakpoints g holds the
//      end value.
//   3. v_c = i*(g+f) (vc_arith), written to the DAC port as a low byte and a
//      high nibble; loop_done pulses.
// Events, one at a time from interrupt_ctrl:
//   STOP      freeze f where it is (g and v_c carry on)
//   CONTINUE  resume f after a STOP
//   NEW       take the buffer (arbitration flip-flop, retried until granted),
//             copy the parameters named in header word 0 into param_ram; a
//             new f table is set to its first end point and waits for START
//   START     run f from t = 0
//   READ      take the buffer, convert both ADC channels, write g, f, v_c, i
//             and the two ADC readings into buffer words 0..5
//   DOUBLE    switch to the other g parameter set
// The event meanings, table sizes and arithmetic follow the document. The
// buffer layout, the end-of-table rules, the use of READ for the ADC readings
// and the state sequence are this design's choices. A tick computation takes
// about 50 + 3*(g segments searched) clocks plus up to two 32-clock
// interpolations, a NEW about 390 clocks, far below the 6000 clocks of a
// millisecond at 6 MHz. Ports to memories are combinational from the state;
// memory read data is used in the following state.
module fg_engine
  import fg_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,
  // events
  input  logic            irq,
  input  logic [2:0]      irq_id,
  output logic            irq_ack,
  output logic            mask_we,
  output logic [NEV-1:0]  mask,
  // buffer arbitration and byte port
  output logic            lock_set,
  output logic            lock_clr,
  input  logic            buf_owned,
  output logic            b_re,
  output logic            b_we,
  output logic [7:0]      b_addr,
  output logic [7:0]      b_wdata,
  input  logic [7:0]      b_rdata,
  // parameter RAM
  output logic            r_we,
  output logic [8:0]      r_addr,
  output logic [15:0]     r_wdata,
  input  logic [15:0]     r_rdata,
  // current, ADC, DAC port
  input  logic [IW-1:0]   i_value,
  output logic            adc_sel,
  output logic            adc_start,
  input  logic            adc_busy,
  input  logic [11:0]     adc_data,
  output logic            pio_a_we,
  output logic            pio_b_we,
  output logic [7:0]      pio_wdata,
  // results and state
  output logic [YW-1:0]   g_val,
  output logic [YW-1:0]   f_val,
  output logic [DACW-1:0] vc,
  output logic            ovf,
  output logic            f_running,
  output logic            gsel,
  output logic            skip3,
  output logic            loop_done
);
  typedef enum logic [5:0] {
    S_INIT, S_IDLE, S_LOCK, S_LOCKCHK,
    S_N_HDR, S_N_HDRW, S_N_LO, S_N_HI, S_N_WR, S_N_END,
    S_R_ADC, S_R_ADCW0, S_R_ADCW, S_R_WR, S_R_END,
    S_T_DT, S_T_ADV, S_T_Y0, S_T_Y1, S_T_DT2, S_T_FI, S_T_FW,
    S_G_X0, S_G_X0W, S_G_XN, S_G_XNW, S_G_Y0, S_G_Y1, S_G_Y2, S_G_W,
    S_VC, S_PA, S_PB
  } state_e;

  state_e        st;
  logic          job_new;        // buffer job: 1 = NEW, 0 = READ
  logic          tick_pend;
  logic          f_run, stopped, adv;
  logic [4:0]    fseg;
  logic [15:0]   tau;
  logic [15:0]   fy0, fy1;
  logic [15:0]   xa, xb, gy0;
  logic          nv;
  logic [5:0]    k;
  logic [6:0]    wd;
  logic [7:0]    hdr, lo;
  logic [11:0]   adc0, adc1;
  logic [IW-1:0] i_s;

  // interpolator
  logic          ip_start, ip_done;
  logic [YW-1:0] ip_y0, ip_y1, ip_y;
  logic [15:0]   ip_x, ip_dx;

  lin_interp #(.YW(YW), .XW(16)) u_interp (
    .clk, .rst_n, .start(ip_start), .y0(ip_y0), .y1(ip_y1),
    .x(ip_x), .dx(ip_dx), .y(ip_y), .done(ip_done)
  );

  logic [YW-1:0]    va_sum;
  logic             va_sat, va_ovf;
  logic [IW+YW-1:0] va_prod;
  logic [11:0]      va_dac;

  vc_arith #(.IW(IW), .YW(YW)) u_arith (
    .g(g_val), .f(f_val), .i(i_s), .skip3, .sum(va_sum), .sat(va_sat),
    .prod(va_prod), .dac(va_dac), .ovf(va_ovf)
  );

  logic [8:0] gbase;
  logic [8:0] map_addr;
  logic       map_en;
  logic [15:0] rd_word;
  assign gbase = gsel ? 9'd64 : 9'd0;

  // buffer word wd -> parameter RAM word
  always_comb begin
    map_addr = '0;
    map_en   = 1'b0;
    if (wd >= 7'(BUF_GX) && wd < 7'(BUF_FDT)) begin
      map_addr = (hdr[HDR_GSET] ? 9'd64 : 9'd0) + 9'(wd - 7'(BUF_GX));
      map_en   = hdr[HDR_LOADG];
    end else if (wd >= 7'(BUF_FDT) && wd < 7'(BUF_FY)) begin
      map_addr = 9'(RAM_FDT) + 9'(wd - 7'(BUF_FDT));
      map_en   = hdr[HDR_LOADF];
    end else if (wd >= 7'(BUF_FY)) begin
      map_addr = 9'(RAM_FY) + 9'(wd - 7'(BUF_FY));
      map_en   = hdr[HDR_LOADF];
    end
  end

  // word k/2 of the READ results
  always_comb begin
    case (k[3:1])
      3'd0:    rd_word = {1'b0, g_val};
      3'd1:    rd_word = {1'b0, f_val};
      3'd2:    rd_word = {4'd0, vc};
      3'd3:    rd_word = {4'd0, i_s};
      3'd4:    rd_word = {4'd0, adc0};
      default: rd_word = {4'd0, adc1};
    endcase
  end

  // combinational strobes and addresses
  always_comb begin
    irq_ack = 1'b0; mask_we = 1'b0; mask = '0;
    lock_set = 1'b0; lock_clr = 1'b0;
    b_re = 1'b0; b_we = 1'b0; b_addr = '0; b_wdata = '0;
    r_we = 1'b0; r_addr = '0; r_wdata = '0;
    adc_start = 1'b0;
    pio_a_we = 1'b0; pio_b_we = 1'b0; pio_wdata = '0;
    loop_done = 1'b0;
    case (st)
      S_INIT:    mask_we = 1'b1;
      S_IDLE:    irq_ack = !tick_pend && irq;
      S_LOCK:    lock_set = 1'b1;
      S_N_HDR:   begin b_re = 1'b1; b_addr = 8'(2*BUF_HDR); end
      S_N_LO:    begin b_re = 1'b1; b_addr = {wd, 1'b0}; end
      S_N_HI:    begin b_re = 1'b1; b_addr = {wd, 1'b1}; end
      S_N_WR:    begin r_we = map_en; r_addr = map_addr; r_wdata = {b_rdata, lo}; end
      S_N_END,
      S_R_END:   lock_clr = 1'b1;
      S_R_ADC:   adc_start = 1'b1;
      S_R_WR:    begin
                   b_we = 1'b1; b_addr = 8'(2*BUF_RD_G) + {2'b0, k};
                   b_wdata = k[0] ? rd_word[15:8] : rd_word[7:0];
                 end
      S_T_DT,
      S_T_DT2:   r_addr = 9'(RAM_FDT) + 9'(fseg);
      S_T_Y0:    r_addr = 9'(RAM_FY) + 9'(fseg);
      S_T_Y1:    r_addr = 9'(RAM_FY) + 9'(fseg) + 9'd1;
      S_G_X0:    r_addr = gbase;
      S_G_XN:    r_addr = gbase + 9'(k) + 9'd1;
      S_G_Y0:    r_addr = gbase + 9'(NPTS) + 9'(k);
      S_G_Y1:    r_addr = gbase + 9'(NPTS) + 9'(k) + 9'd1;
      S_PA:      begin pio_a_we = 1'b1; pio_wdata = vc[7:0]; end
      S_PB:      begin pio_b_we = 1'b1; pio_wdata = {4'd0, vc[11:8]}; loop_done = 1'b1; end
      default: ;
    endcase
  end

  assign adc_sel   = k[0];
  assign f_running = f_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_INIT; job_new <= 1'b0; tick_pend <= 1'b0;
      f_run <= 1'b0; stopped <= 1'b0; adv <= 1'b0; fseg <= '0; tau <= '0;
      fy0 <= '0; fy1 <= '0; xa <= '0; xb <= '0; gy0 <= '0; nv <= 1'b0;
      k <= '0; wd <= '0; hdr <= '0; lo <= '0; adc0 <= '0; adc1 <= '0; i_s <= '0;
      g_val <= '0; f_val <= '0; vc <= '0; ovf <= 1'b0; gsel <= 1'b0; skip3 <= 1'b0;
      ip_start <= 1'b0; ip_y0 <= '0; ip_y1 <= '0; ip_x <= '0; ip_dx <= '0;
    end else begin
      ip_start <= 1'b0;
      if (tick) tick_pend <= 1'b1;
      case (st)
        S_INIT: st <= S_IDLE;

        S_IDLE: begin
          if (tick_pend) begin
            if (!tick) tick_pend <= 1'b0;
            i_s <= i_value;
            st  <= S_T_DT;
          end else if (irq) begin
            case (irq_id)
              EV_STOP:     if (f_run) begin f_run <= 1'b0; stopped <= 1'b1; end
              EV_CONTINUE: if (stopped) begin f_run <= 1'b1; stopped <= 1'b0; end
              EV_START:    begin fseg <= '0; tau <= '0; f_run <= 1'b1; stopped <= 1'b0; end
              EV_DOUBLE:   gsel <= !gsel;
              EV_NEW:      begin job_new <= 1'b1; st <= S_LOCK; end
              EV_READ:     begin job_new <= 1'b0; st <= S_LOCK; end
              default: ;
            endcase
          end
        end

        S_LOCK:    st <= S_LOCKCHK;
        S_LOCKCHK: if (!buf_owned) st <= S_LOCK;
                   else if (job_new) st <= S_N_HDR;
                   else begin k <= '0; st <= S_R_ADC; end

        // NEW: copy buffer words 1..127 into the parameter RAM
        S_N_HDR:  st <= S_N_HDRW;
        S_N_HDRW: begin hdr <= b_rdata; wd <= 7'd1; st <= S_N_LO; end
        S_N_LO:   st <= S_N_HI;
        S_N_HI:   begin lo <= b_rdata; st <= S_N_WR; end
        S_N_WR:   if (wd == 7'(BUF_WORDS - 1)) st <= S_N_END;
                  else begin wd <= wd + 1'b1; st <= S_N_LO; end
        S_N_END: begin
          skip3 <= hdr[HDR_SKIP3];
          if (hdr[HDR_LOADF]) begin
            fseg <= '0; tau <= '0; f_run <= 1'b0; stopped <= 1'b0;
          end
          st <= S_IDLE;
        end

        // READ: both ADC channels, then six words into the buffer
        S_R_ADC:   st <= S_R_ADCW0;
        S_R_ADCW0: st <= S_R_ADCW;
        S_R_ADCW:  if (!adc_busy) begin
                     if (k[0]) begin adc1 <= adc_data; k <= '0; st <= S_R_WR; end
                     else begin adc0 <= adc_data; k <= 6'd1; st <= S_R_ADC; end
                   end
        S_R_WR:    if (k == 6'(2*BUF_RD_N - 1)) st <= S_R_END;
                   else k <= k + 1'b1;
        S_R_END:   st <= S_IDLE;

        // tick, part 1: f(t)
        S_T_DT: st <= S_T_ADV;
        S_T_ADV: begin
          if (f_run) begin
            if (r_rdata == 16'd0 || fseg == 5'(NSEG)) f_run <= 1'b0;
            else if (tau + 16'd1 >= r_rdata) begin
              fseg <= fseg + 1'b1; tau <= '0; adv <= 1'b1;
            end else tau <= tau + 1'b1;
          end
          st <= S_T_Y0;
        end
        S_T_Y0:  st <= S_T_Y1;
        S_T_Y1:  begin fy0 <= r_rdata; st <= S_T_DT2; end
        S_T_DT2: begin fy1 <= r_rdata; st <= S_T_FI; end
        S_T_FI: begin
          adv <= 1'b0;
          if (adv && (fy0[15] || fseg == 5'(NSEG) || r_rdata == 16'd0)) f_run <= 1'b0;
          if (tau == 16'd0 || fseg == 5'(NSEG) || r_rdata == 16'd0) begin
            f_val <= fy0[YW-1:0];
            st    <= S_G_X0;
          end else if (tau >= r_rdata) begin
            f_val <= fy1[YW-1:0];
            st    <= S_G_X0;
          end else begin
            ip_y0 <= fy0[YW-1:0]; ip_y1 <= fy1[YW-1:0];
            ip_x  <= tau;         ip_dx <= r_rdata;
            ip_start <= 1'b1;
            st    <= S_T_FW;
          end
        end
        S_T_FW: if (ip_done) begin f_val <= ip_y; st <= S_G_X0; end

        // tick, part 2: g(i)
        S_G_X0:  begin k <= '0; st <= S_G_X0W; end
        S_G_X0W: begin xa <= r_rdata; st <= S_G_XN; end
        S_G_XN:  if (k == 6'(NSEG)) begin nv <= 1'b0; st <= S_G_Y0; end
                 else st <= S_G_XNW;
        S_G_XNW: begin
          xb <= r_rdata;
          nv <= (r_rdata > xa);
          if (r_rdata > xa && r_rdata <= 16'(i_s)) begin
            k <= k + 1'b1; xa <= r_rdata; st <= S_G_XN;
          end else st <= S_G_Y0;
        end
        S_G_Y0: st <= S_G_Y1;
        S_G_Y1: begin gy0 <= r_rdata; st <= S_G_Y2; end
        S_G_Y2: begin
          if (!nv || 16'(i_s) <= xa) begin
            g_val <= gy0[YW-1:0];
            st    <= S_VC;
          end else begin
            ip_y0 <= gy0[YW-1:0];   ip_y1 <= r_rdata[YW-1:0];
            ip_x  <= 16'(i_s) - xa; ip_dx <= xb - xa;
            ip_start <= 1'b1;
            st    <= S_G_W;
          end
        end
        S_G_W: if (ip_done) begin g_val <= ip_y; st <= S_VC; end

        // tick, part 3: v_c to the DAC port
        S_VC: begin vc <= va_dac; ovf <= va_ovf; st <= S_PA; end
        S_PA: st <= S_PB;
        S_PB: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
