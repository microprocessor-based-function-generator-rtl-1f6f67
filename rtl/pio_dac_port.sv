// pio_dac_port: the byte-wide parallel output ports that drive the 12-bit DAC.
//
// The processor side writes the low 8 bits to port A and then the high 4 bits
// to port B; the DAC word changes only on the port B write, so the DAC never
// sees half of an update. While the host has not enabled the ramp the DAC word
// is held at 0. The document says only that a PIO sits between processor and
// DAC; the two-write update order and the gating are this design's choices.
module pio_dac_port (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        a_we,
  input  logic        b_we,
  input  logic [7:0]  wdata,
  input  logic        ramp_en,
  output logic [11:0] dac_code
);
  logic [7:0]  a_reg;
  logic [11:0] code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg <= '0;
      code  <= '0;
    end else begin
      if (a_we) a_reg <= wdata;
      if (b_we) code  <= {wdata[3:0], a_reg};
    end
  end

  assign dac_code = ramp_en ? code : 12'd0;
endmodule
