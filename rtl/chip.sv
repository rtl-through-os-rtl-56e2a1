// chip: the complete processor, the top-level "Chip" of the design.
//
// It wires the core to the memory subsystem (fetch and data ports), the
// memory subsystem's main memory to the DRAM controller (AXI4 master to the
// DRAM the processor shares with the Arm core), the video memory's second
// port to the VGA controller, and the timer and keyboard controllers to the
// core's CSRs and interrupt controller.
// Two clocks come in: clk drives the core and everything on the core side
// (50 MHz in the document); clk_vga_mem drives the VGA controller and the
// VGA port of video memory (100 MHz, four times the 25 MHz pixel clock).
// The reset is synchronised into the video clock domain. Execution starts at
// address 0 once rst is released; the program is expected to be in DRAM
// already (the document's Arm core loads it).
module chip #(
  parameter int unsigned CACHE_BYTES = 4096,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned VRAM_WORDS  = 4096,
  parameter int unsigned BP_ENTRIES  = 128,
  parameter logic [31:0] DRAM_BASE   = 32'h0800_0000,
  parameter logic [31:0] RESET_PC    = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        clk_vga_mem,
  input  logic        rst,
  // AXI4 master to DRAM
  output logic [31:0] m_axi_awaddr,
  output logic [7:0]  m_axi_awlen,
  output logic [2:0]  m_axi_awsize,
  output logic [1:0]  m_axi_awburst,
  output logic        m_axi_awvalid,
  input  logic        m_axi_awready,
  output logic [31:0] m_axi_wdata,
  output logic [3:0]  m_axi_wstrb,
  output logic        m_axi_wlast,
  output logic        m_axi_wvalid,
  input  logic        m_axi_wready,
  input  logic [1:0]  m_axi_bresp,
  input  logic        m_axi_bvalid,
  output logic        m_axi_bready,
  output logic [31:0] m_axi_araddr,
  output logic [7:0]  m_axi_arlen,
  output logic [2:0]  m_axi_arsize,
  output logic [1:0]  m_axi_arburst,
  output logic        m_axi_arvalid,
  input  logic        m_axi_arready,
  input  logic [31:0] m_axi_rdata,
  input  logic [1:0]  m_axi_rresp,
  input  logic        m_axi_rlast,
  input  logic        m_axi_rvalid,
  output logic        m_axi_rready,
  // PS/2 keyboard
  input  logic        ps2_clk,
  input  logic        ps2_data,
  // VGA
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  // retirement trace
  output logic        retire_valid,
  output logic [31:0] retire_pc
);
  import rv_pkg::*;

  logic      f_req_valid, f_req_ready, f_resp_valid;
  logic [31:0] f_req_addr;
  mem_resp_t f_resp, d_resp;
  logic      d_req_valid, d_req_ready, d_resp_valid;
  mem_req_t  d_req;

  logic        timer_irq, tcmp_we, tcmp_hi;
  logic [31:0] tcmp_wdata;
  logic [63:0] time_val, timecmp_val;
  logic        kb_valid, kb_ack;
  logic [7:0]  kb_data;

  core #(.RESET_PC(RESET_PC), .BP_ENTRIES(BP_ENTRIES)) u_core (
    .clk, .rst,
    .f_req_valid, .f_req_ready, .f_req_addr, .f_resp_valid, .f_resp,
    .d_req_valid, .d_req_ready, .d_req, .d_resp_valid, .d_resp,
    .timer_irq, .time_val, .timecmp_val, .tcmp_we, .tcmp_hi, .tcmp_wdata,
    .kb_valid, .kb_data, .kb_ack,
    .retire_valid, .retire_pc
  );

  logic        line_req_valid, line_req_ready, line_req_we, line_done;
  logic [31:0] line_req_addr;
  logic [LINE_BYTES*8-1:0] line_wdata, line_rdata;
  logic [$clog2(VRAM_WORDS)-1:0] vga_addr;
  logic [31:0] vga_rdata;

  memory_subsystem #(.CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES), .VRAM_WORDS(VRAM_WORDS)) u_mem (
    .clk, .rst,
    .f_req_valid, .f_req_ready, .f_req_addr, .f_resp_valid, .f_resp,
    .d_req_valid, .d_req_ready, .d_req, .d_resp_valid, .d_resp,
    .clk_vga_mem, .vga_addr, .vga_rdata,
    .line_req_valid, .line_req_ready, .line_req_we, .line_req_addr, .line_wdata,
    .line_done, .line_rdata
  );

  dram_controller #(.LINE_BYTES(LINE_BYTES), .DRAM_BASE(DRAM_BASE)) u_dram (
    .clk, .rst,
    .line_req_valid, .line_req_ready, .line_req_we, .line_req_addr, .line_wdata,
    .line_done, .line_rdata,
    .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst, .m_axi_awvalid, .m_axi_awready,
    .m_axi_wdata, .m_axi_wstrb, .m_axi_wlast, .m_axi_wvalid, .m_axi_wready,
    .m_axi_bresp, .m_axi_bvalid, .m_axi_bready,
    .m_axi_araddr, .m_axi_arlen, .m_axi_arsize, .m_axi_arburst, .m_axi_arvalid, .m_axi_arready,
    .m_axi_rdata, .m_axi_rresp, .m_axi_rlast, .m_axi_rvalid, .m_axi_rready
  );

  timer_controller u_timer (
    .clk, .rst, .cmp_we(tcmp_we), .cmp_hi(tcmp_hi), .cmp_wdata(tcmp_wdata),
    .time_val, .cmp_val(timecmp_val), .timer_irq
  );

  keyboard_controller u_kbd (
    .clk, .rst, .ps2_clk, .ps2_data, .char_data(kb_data), .char_valid(kb_valid), .ack(kb_ack)
  );

  logic [1:0] rst_vga_s;
  always_ff @(posedge clk_vga_mem) rst_vga_s <= {rst_vga_s[0], rst};

  vga_controller #(.VRAM_WORDS(VRAM_WORDS), .FONT_BASE(VRAM_WORDS * 3 / 4)) u_vga (
    .clk(clk_vga_mem), .rst(rst_vga_s[1]),
    .vram_addr(vga_addr), .vram_rdata(vga_rdata),
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs
  );
endmodule
