// status_register: the status word the host reads over Camac.
//
// The NSTAT status lines of the power supply are asynchronous; they pass a
// two-flop synchroniser. The word carries them in bits NSTAT-1:0 and six
// module flags above them (ramp enable, P.S. on, f(t) running, DAC overflow,
// buffer held by the engine, heartbeat). The ten lines follow the document;
// the bit layout is this design's. The word lags the inputs by two clocks.
module status_register #(
  parameter int NSTAT = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NSTAT-1:0] ps_status,
  input  logic [15-NSTAT:0] flags,
  output logic [15:0]      word
);
  logic [NSTAT-1:0] s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= ps_status;
      s2 <= s1;
    end
  end

  assign word = {flags, s2};
endmodule
