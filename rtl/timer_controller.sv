// timer_controller: the machine timer.
//
// A 64-bit time counter advances by one every clock cycle; a 64-bit compare
// register is written by the core through two CSRs (low and high halves).
// The timer interrupt line is high while time >= compare, as for the RISC-V
// mtime/mtimecmp pair, and stays high until software moves the compare
// value forward. Compare resets to all ones so no interrupt fires before
// software sets it. The document names the block and its role (timer
// interrupts delivered to the kernel); the register set is this design's
// choice, modelled on the RISC-V privileged specification.
module timer_controller (
  input  logic        clk,
  input  logic        rst,
  input  logic        cmp_we,
  input  logic        cmp_hi,
  input  logic [31:0] cmp_wdata,
  output logic [63:0] time_val,
  output logic [63:0] cmp_val,
  output logic        timer_irq
);
  always_ff @(posedge clk) begin
    if (rst) begin
      time_val <= '0;
      cmp_val  <= '1;
    end else begin
      time_val <= time_val + 64'd1;
      if (cmp_we) begin
        if (cmp_hi) cmp_val[63:32] <= cmp_wdata;
        else        cmp_val[31:0]  <= cmp_wdata;
      end
    end
  end
  assign timer_irq = (time_val >= cmp_val);
endmodule
