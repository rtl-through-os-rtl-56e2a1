// dram_controller: AXI4 master that moves whole cache lines to and from the
// DRAM shared with the hard Arm core.
//
// The main memory asks for one line at a time (line_req_valid/ready, a write
// when line_req_we); line_done pulses when the line has been written (write
// response received) or read (last read beat received, data on line_rdata).
// A line of LINE_BYTES is one INCR burst of 32-bit beats (16 beats for a
// 64-byte line). The RISC-V physical address is offset by DRAM_BASE, so the
// processor sees its own window of DRAM and the memory below it stays with
// the Arm core. The document says the team wrote its own AXI controller and
// reserved 128 MB of the 512 MB for the Arm core; the burst format, the
// 32-bit data width and the placement of the window are this design's
// choices. Only one transaction is in flight; ids are always 0.
module dram_controller #(
  parameter int unsigned LINE_BYTES = 64,
  parameter logic [31:0] DRAM_BASE  = 32'h0800_0000
) (
  input  logic        clk,
  input  logic        rst,
  // line interface
  input  logic        line_req_valid,
  output logic        line_req_ready,
  input  logic        line_req_we,
  input  logic [31:0] line_req_addr,
  input  logic [LINE_BYTES*8-1:0] line_wdata,
  output logic        line_done,
  output logic [LINE_BYTES*8-1:0] line_rdata,
  // AXI4 master
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
  output logic        m_axi_rready
);
  localparam int unsigned BEATS = LINE_BYTES / 4;
  localparam int unsigned BW    = $clog2(BEATS);

  typedef enum logic [2:0] {S_IDLE, S_AW, S_W, S_B, S_AR, S_R, S_DONE} st_e;
  st_e st;
  logic [31:0] addr_q;
  logic [LINE_BYTES*8-1:0] buf_q;
  logic [BW-1:0] beat;

  assign line_req_ready = (st == S_IDLE);
  assign line_done      = (st == S_DONE);
  assign line_rdata     = buf_q;

  assign m_axi_awaddr  = addr_q;
  assign m_axi_awlen   = 8'(BEATS - 1);
  assign m_axi_awsize  = 3'd2;
  assign m_axi_awburst = 2'b01;
  assign m_axi_awvalid = (st == S_AW);
  assign m_axi_wdata   = buf_q[beat*32 +: 32];
  assign m_axi_wstrb   = 4'hF;
  assign m_axi_wlast   = (beat == BW'(BEATS - 1));
  assign m_axi_wvalid  = (st == S_W);
  assign m_axi_bready  = (st == S_B);
  assign m_axi_araddr  = addr_q;
  assign m_axi_arlen   = 8'(BEATS - 1);
  assign m_axi_arsize  = 3'd2;
  assign m_axi_arburst = 2'b01;
  assign m_axi_arvalid = (st == S_AR);
  assign m_axi_rready  = (st == S_R);

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= S_IDLE;
      beat   <= '0;
      addr_q <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (line_req_valid) begin
          addr_q <= line_req_addr + DRAM_BASE;
          beat   <= '0;
          if (line_req_we) begin
            buf_q <= line_wdata;
            st    <= S_AW;
          end else begin
            st <= S_AR;
          end
        end
        S_AW: if (m_axi_awready) st <= S_W;
        S_W:  if (m_axi_wready) begin
          beat <= beat + 1'b1;
          if (m_axi_wlast) st <= S_B;
        end
        S_B:  if (m_axi_bvalid) st <= S_DONE;
        S_AR: if (m_axi_arready) st <= S_R;
        S_R:  if (m_axi_rvalid) begin
          buf_q[beat*32 +: 32] <= m_axi_rdata;
          beat <= beat + 1'b1;
          if (m_axi_rlast) st <= S_DONE;
        end
        S_DONE: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // AXI rule: a valid address stays stable until it is accepted
  a_ar_stable: assert property (@(posedge clk) disable iff (rst)
    (m_axi_arvalid && !m_axi_arready) |=> (m_axi_arvalid && $stable(m_axi_araddr)));
  a_aw_stable: assert property (@(posedge clk) disable iff (rst)
    (m_axi_awvalid && !m_axi_awready) |=> (m_axi_awvalid && $stable(m_axi_awaddr)));
endmodule
