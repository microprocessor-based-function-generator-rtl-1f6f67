// tb_interrupt_ctrl: events are ignored while masked (the state after reset),
// latched once unmasked, served lowest number first with vector
// 0x40 + 2*number, and each acknowledge clears exactly the presented event.
// Random event and acknowledge traffic is checked against a reference.
module tb_interrupt_ctrl;
  import fg_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NEV-1:0] ev, mask_in, pending;
  logic mask_we, ack, irq;
  logic [2:0] id;
  logic [7:0] vector;
  logic [NEV-1:0] model, m_mask;
  int checks = 0, failures = 0;

  interrupt_ctrl #(.VEC_BASE(8'h40)) dut (.clk, .rst_n, .ev, .mask_we, .mask_in, .ack, .irq, .id, .vector, .pending);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int lowest(logic [NEV-1:0] p);
    for (int k = 0; k < NEV; k++) if (p[k]) return k;
    return 0;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ev = 0; mask_in = 0; mask_we = 0; ack = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ev = 6'b111111; @(negedge clk); ev = 0;
    chk(!irq, "masked after reset");
    mask_we = 1; mask_in = 6'b000000; @(negedge clk); mask_we = 0;
    ev = 6'b011000; @(negedge clk); ev = 0;   // START and READ together
    chk(irq && id == 3'(EV_START) && vector == 8'h46, "START first, vector 0x46");
    ack = 1; @(negedge clk); ack = 0;
    chk(irq && id == 3'(EV_READ) && vector == 8'h48, "READ next");
    ack = 1; @(negedge clk); ack = 0;
    chk(!irq, "all served");
    mask_we = 1; mask_in = 6'b000100; @(negedge clk); mask_we = 0;  // mask NEW
    ev = 6'b000101; @(negedge clk); ev = 0;
    chk(pending == 6'b000001, "masked NEW not latched");
    ack = 1; @(negedge clk); ack = 0;
    model = 0; m_mask = 6'b000100;
    for (int n = 0; n < 3000; n++) begin
      ev = NEV'($urandom) & NEV'($urandom);
      ack = irq && ($urandom % 2);
      mask_we = ($urandom % 50) == 0; mask_in = NEV'($urandom) & NEV'($urandom);
      #1;
      chk(irq == (model != 0), "irq");
      if (model != 0) chk(id == 3'(lowest(model)) && vector == 8'h40 + 8'(2*lowest(model)), "id/vector");
      @(negedge clk);
      begin
        logic [NEV-1:0] clr;
        clr = ack ? (NEV'(1) << lowest(model)) : '0;
        model = (model & ~clr) | (ev & ~m_mask);
        if (mask_we) m_mask = mask_in;
      end
      chk(pending == model, "pending");
    end
    ev = 0; ack = 0; mask_we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
