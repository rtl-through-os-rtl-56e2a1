// interrupt_controller: the programmable interrupt controller (PIC).
//
// Two sources are wired in: the timer controller's level interrupt (machine
// timer, cause 7) and the keyboard controller's "character available" level
// (machine external, cause 11). The pending bits (mip.MTIP, mip.MEIP) are the
// registered source levels. An interrupt is requested when a source is
// pending, its mie enable bit is set and mstatus.MIE is set; external has
// priority over timer, as in the RISC-V privileged specification. The
// request goes to the control flow unit, which drains the pipeline before
// the trap is taken. The sources (PS/2, timer) and the role follow the
// document; the register layout is the RISC-V standard one.
module interrupt_controller (
  input  logic        clk,
  input  logic        rst,
  input  logic        timer_irq,
  input  logic        kbd_irq,
  input  logic        mstatus_mie,
  input  logic [31:0] mie,
  output logic [31:0] mip,
  output logic        irq_pending,
  output logic [3:0]  irq_cause
);
  import rv_pkg::*;

  logic mtip, meip;
  always_ff @(posedge clk) begin
    if (rst) begin
      mtip <= 1'b0;
      meip <= 1'b0;
    end else begin
      mtip <= timer_irq;
      meip <= kbd_irq;
    end
  end

  logic ext_en, tim_en;
  always_comb begin
    mip         = '0;
    mip[7]      = mtip;
    mip[11]     = meip;
    ext_en      = meip && mie[11];
    tim_en      = mtip && mie[7];
    irq_pending = mstatus_mie && (ext_en || tim_en);
    irq_cause   = ext_en ? IRQ_EXT : IRQ_TIMER;
  end
endmodule
