// fg_pkg: constants and types shared by the correction-coil function generator.
//
// The function generator turns two piecewise-linear curves, g(i) of the main
// dipole current and f(t) of time, into a 12-bit DAC word v_c = i*(g(i)+f(t))
// once per millisecond. This package holds the table sizes, the layout of the
// host-visible buffer memory and of the parameter RAM, the event numbering of
// the Tevatron-clock interrupts and the Camac function codes. Sizes (32 end
// points, 31 segments, 128-word buffer, 12-bit i and DAC, 15-bit values,
// 16-bit segment lengths in ms) follow the document; the memory layouts, the
// header bits and the extra Camac codes are this design's own choices.
package fg_pkg;

  // Curve tables
  localparam int NPTS  = 32;           // end points per curve
  localparam int NSEG  = NPTS - 1;     // segments per curve
  localparam int IW    = 12;           // main dipole current i
  localparam int YW    = 15;           // g and f values
  localparam int TW    = 16;           // segment length in ms
  localparam int DACW  = 12;

  // Buffer memory as seen by Camac (16-bit word addresses)
  localparam int BUF_WORDS = 128;
  localparam int BUF_HDR   = 0;        // header word
  localparam int BUF_GX    = 1;        // 32 i breakpoints
  localparam int BUF_GY    = 33;       // 32 g values
  localparam int BUF_FDT   = 65;       // 31 segment lengths
  localparam int BUF_FY    = 96;       // 32 f values, bit 15 = stop bit
  // Words written back by a READ event
  localparam int BUF_RD_G  = 0;
  localparam int BUF_RD_N  = 6;        // g, f, v_c, i, adc ch0, adc ch1

  // Header bits (buffer word 0)
  localparam int HDR_GSET  = 0;        // g set the g tables go to
  localparam int HDR_LOADG = 1;
  localparam int HDR_LOADF = 2;
  localparam int HDR_SKIP3 = 3;        // drop the top 3 product bits

  // Parameter RAM word addresses
  localparam int RAM_WORDS = 512;      // 1 kbyte
  localparam int RAM_G     = 0;        // g set s: x at 64*s+k, y at 64*s+32+k
  localparam int RAM_FDT   = 128;
  localparam int RAM_FY    = 160;

  // Tevatron clock events (vectored, maskable interrupts); lower = higher priority
  typedef enum logic [2:0] {
    EV_STOP     = 3'd0,
    EV_CONTINUE = 3'd1,
    EV_NEW      = 3'd2,
    EV_START    = 3'd3,
    EV_READ     = 3'd4,
    EV_DOUBLE   = 3'd5
  } ev_e;
  localparam int NEV = 6;

  // Camac function codes
  localparam logic [4:0] F_READ_BUF    = 5'd0;
  localparam logic [4:0] F_READ_STATUS = 5'd1;
  localparam logic [4:0] F_WRITE_BUF   = 5'd16;
  localparam logic [4:0] F_WRITE_PSC   = 5'd17;
  localparam logic [4:0] F_LOAD_ADDR   = 5'd20;
  localparam logic [4:0] F_DISABLE     = 5'd24;
  localparam logic [4:0] F_ENABLE      = 5'd26;

endpackage
