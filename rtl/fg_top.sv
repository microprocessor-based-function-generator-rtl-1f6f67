// fg_top: one correction-coil function generator module.
//
// The module sits in a Camac crate. The host loads piecewise-linear tables for
// g(i) and f(t) into a 128-word buffer memory over the dataway, and steers the
// module with events from the Tevatron clock (STOP, CONTINUE, NEW, START,
// READ, DOUBLE VALUE) plus a 1 kHz real-time tick. Each millisecond the engine
// samples the main dipole current i and outputs v_c = i*(g(i)+f(t)) as a
// 12-bit DAC word that sets the correction-coil power supply. The module also
// switches the supply on/off, resets it, reports its 10 status lines, reads a
// two-channel ADC for the host and drives three front-panel LEDs.
//
// Blocks and their connections follow the module's block diagram: Camac
// interface with auto-incrementing address pointer, arbitration, buffer
// memory, RAM, I register, DAC port, status, P.S. control, reset. The
// microprocessor and its program are replaced by fg_engine, a state machine
// that performs what the program is described to do. The clock decoder, DAC,
// ADC with its multiplexer, and the oscillator are outside this RTL; their
// digital signals are ports. One clock domain (clk, 6 MHz in the original);
// reset is generated internally from por_n and Camac Z*S2.
module fg_top
  import fg_pkg::*;
#(
  parameter int RESET_CYCLES = 64,
  parameter int PSR_CYCLES   = 6000,
  parameter int LED_CYCLES   = 600000,
  parameter int HB_LOOPS     = 250
) (
  input  logic            clk,
  input  logic            por_n,
  // Camac dataway
  input  logic            camac_n,
  input  logic            camac_s1,
  input  logic            camac_s2,
  input  logic            camac_z,
  input  logic [4:0]      camac_f,
  input  logic [3:0]      camac_a,
  input  logic [15:0]     camac_w,
  output logic [15:0]     camac_r,
  output logic            camac_q,
  output logic            camac_x,
  // Tevatron clock decoder
  input  logic            tick_1khz,
  input  logic [NEV-1:0]  tevent,
  // rear connector
  input  logic [IW-1:0]   i_in,
  input  logic [9:0]      ps_status,
  output logic            ps_on,
  output logic            ps_reset,
  output logic [DACW-1:0] dac_code,
  output logic            adc_sel,
  output logic            adc_start,
  input  logic            adc_busy,
  input  logic [11:0]     adc_data,
  // front panel
  output logic            led_n,
  output logic            led_ramp,
  output logic            led_heartbeat
);
  logic rst_n;

  reset_gen #(.RESET_CYCLES(RESET_CYCLES)) u_reset (
    .clk, .por_n, .camac_z, .camac_s2, .rst_n
  );

  // Camac side
  logic        n_cycle, addr_load, addr_inc, buf_req, buf_grant;
  logic [6:0]  addr_val, c_addr;
  logic        c_re, c_we;
  logic [15:0] c_wdata, c_rdata, status_word;
  logic        psc_we, ramp_en;
  logic [1:0]  psc_wdata;

  camac_interface #(.AW(7)) u_camac (
    .clk, .rst_n, .n(camac_n), .s1(camac_s1), .f(camac_f), .a(camac_a), .w(camac_w),
    .r(camac_r), .q(camac_q), .x(camac_x), .n_cycle,
    .addr_load, .addr_val, .addr_inc, .buf_req, .buf_grant,
    .c_re, .c_we, .c_wdata, .c_rdata, .status_word, .psc_we, .psc_wdata, .ramp_en
  );

  camac_address #(.AW(7)) u_addr (
    .clk, .rst_n, .load(addr_load), .load_val(addr_val), .inc(addr_inc), .addr(c_addr)
  );

  // buffer and arbitration
  logic       lock_set, lock_clr, buf_owned;
  logic       b_re, b_we;
  logic [7:0] b_addr, b_wdata, b_rdata;

  buffer_arbiter u_arb (
    .clk, .rst_n, .cpu_set(lock_set), .cpu_clr(lock_clr), .camac_req(buf_req),
    .camac_grant(buf_grant), .cpu_owns(buf_owned)
  );

  buffer_memory #(.WORDS(BUF_WORDS)) u_buf (
    .clk, .rst_n,
    .c_re, .c_we, .c_addr, .c_wdata, .c_rdata,
    .p_re(b_re), .p_we(b_we), .p_addr(b_addr), .p_wdata(b_wdata), .p_rdata(b_rdata)
  );

  // engine side
  logic            r_we;
  logic [8:0]      r_addr;
  logic [15:0]     r_wdata, r_rdata;
  logic            irq, irq_ack, mask_we;
  logic [2:0]      irq_id;
  logic [7:0]      irq_vector;
  logic [NEV-1:0]  mask, ev_pending;
  logic [IW-1:0]   i_value;
  logic            i_valid;
  logic            pio_a_we, pio_b_we;
  logic [7:0]      pio_wdata;
  logic [YW-1:0]   g_val, f_val;
  logic [DACW-1:0] vc;
  logic            ovf, f_running, gsel, skip3, loop_done;

  param_ram #(.WORDS(RAM_WORDS)) u_ram (
    .clk, .we(r_we), .addr(r_addr), .wdata(r_wdata), .rdata(r_rdata)
  );

  interrupt_ctrl u_irq (
    .clk, .rst_n, .ev(tevent), .mask_we, .mask_in(mask), .ack(irq_ack),
    .irq, .id(irq_id), .vector(irq_vector), .pending(ev_pending)
  );

  i_register #(.IW(IW)) u_ireg (
    .clk, .rst_n, .sample(tick_1khz), .i_in, .i_out(i_value), .valid(i_valid)
  );

  fg_engine u_engine (
    .clk, .rst_n, .tick(tick_1khz),
    .irq, .irq_id, .irq_ack, .mask_we, .mask,
    .lock_set, .lock_clr, .buf_owned,
    .b_re, .b_we, .b_addr, .b_wdata, .b_rdata,
    .r_we, .r_addr, .r_wdata, .r_rdata,
    .i_value, .adc_sel, .adc_start, .adc_busy, .adc_data,
    .pio_a_we, .pio_b_we, .pio_wdata,
    .g_val, .f_val, .vc, .ovf, .f_running, .gsel, .skip3, .loop_done
  );

  pio_dac_port u_pio (
    .clk, .rst_n, .a_we(pio_a_we), .b_we(pio_b_we), .wdata(pio_wdata),
    .ramp_en, .dac_code
  );

  status_register #(.NSTAT(10)) u_status (
    .clk, .rst_n, .ps_status,
    .flags({led_heartbeat, buf_owned, ovf, f_running, ps_on, ramp_en}),
    .word(status_word)
  );

  ps_control #(.PSR_CYCLES(PSR_CYCLES)) u_psc (
    .clk, .rst_n, .we(psc_we), .wdata(psc_wdata), .ps_on, .ps_reset
  );

  front_panel_leds #(.LED_CYCLES(LED_CYCLES), .HB_LOOPS(HB_LOOPS)) u_leds (
    .clk, .rst_n, .n_cycle, .ramp_en, .loop_done, .led_n, .led_ramp, .led_heartbeat
  );
endmodule
