// memory_subsystem: the processor's top-level memory controller.
//
// It holds the video memory and the cached main memory and routes the
// core's requests between them. The fetch port goes to main memory only:
// instructions are never fetched from video memory. The data port goes to
// video memory when the address is at or above VRAM_BASE and to main
// memory otherwise. The VGA port reads video memory directly and never
// reaches main memory. Each port holds at most one pending operation: a
// data request is accepted only when no request to the other target is
// still outstanding, and the response is taken from the target that was
// addressed.
// Video memory answers a load or store on the cycle after it is accepted.
// An AMO reads the old word in that cycle, writes the result, and answers
// one cycle later. The routing rules and the single pending
// operation per port follow the document; the address split is this
// design's choice.
module memory_subsystem #(
  parameter int unsigned CACHE_BYTES = 4096,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned VRAM_WORDS  = 4096
) (
  input  logic              clk,
  input  logic              rst,
  // fetch port
  input  logic              f_req_valid,
  output logic              f_req_ready,
  input  logic [31:0]       f_req_addr,
  output logic              f_resp_valid,
  output rv_pkg::mem_resp_t f_resp,
  // data port
  input  logic              d_req_valid,
  output logic              d_req_ready,
  input  rv_pkg::mem_req_t  d_req,
  output logic              d_resp_valid,
  output rv_pkg::mem_resp_t d_resp,
  // VGA port
  input  logic              clk_vga_mem,
  input  logic [$clog2(VRAM_WORDS)-1:0] vga_addr,
  output logic [31:0]       vga_rdata,
  // main memory to DRAM controller
  output logic              line_req_valid,
  input  logic              line_req_ready,
  output logic              line_req_we,
  output logic [31:0]       line_req_addr,
  output logic [LINE_BYTES*8-1:0] line_wdata,
  input  logic              line_done,
  input  logic [LINE_BYTES*8-1:0] line_rdata
);
  import rv_pkg::*;
  localparam int unsigned VAW = $clog2(VRAM_WORDS);

  logic to_vram;
  assign to_vram = (d_req.addr >= VRAM_BASE);

  // main memory
  logic      mm_d_valid, mm_d_ready, mm_d_resp_valid;
  mem_resp_t mm_d_resp;
  logic      mm_pending;

  main_memory #(.CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES)) u_main (
    .clk, .rst,
    .f_req_valid, .f_req_ready, .f_req_addr, .f_resp_valid, .f_resp,
    .d_req_valid(mm_d_valid), .d_req_ready(mm_d_ready), .d_req,
    .d_resp_valid(mm_d_resp_valid), .d_resp(mm_d_resp),
    .line_req_valid, .line_req_ready, .line_req_we, .line_req_addr, .line_wdata,
    .line_done, .line_rdata
  );

  // video memory, port A state
  typedef enum logic [1:0] {V_IDLE, V_RESP, V_AMO} vst_e;
  vst_e        vst;
  mem_req_t    v_q;
  logic        va_en;
  logic [3:0]  va_be;
  logic [VAW-1:0] va_addr;
  logic [31:0] va_wdata, va_rdata;

  vram #(.WORDS(VRAM_WORDS)) u_vram (
    .clk_a(clk), .a_en(va_en), .a_be(va_be), .a_addr(va_addr), .a_wdata(va_wdata), .a_rdata(va_rdata),
    .clk_b(clk_vga_mem), .b_addr(vga_addr), .b_rdata(vga_rdata)
  );

  logic v_accept, m_accept, v_free, m_free;
  assign v_free = (vst == V_IDLE) && !mm_pending;
  assign m_free = (vst == V_IDLE) && (!mm_pending || mm_d_resp_valid) && mm_d_ready;

  assign d_req_ready = to_vram ? v_free : m_free;
  assign v_accept    = d_req_valid && to_vram && v_free;
  assign m_accept    = d_req_valid && !to_vram && m_free;
  assign mm_d_valid  = d_req_valid && !to_vram && (vst == V_IDLE) && (!mm_pending || mm_d_resp_valid);

  always_comb begin
    va_en    = 1'b0;
    va_be    = 4'h0;
    va_addr  = d_req.addr[2 +: VAW];
    va_wdata = d_req.wdata;
    if (v_accept) begin
      va_en = 1'b1;
      va_be = (d_req.op == MEM_STORE) ? d_req.be : 4'h0;
    end else if (vst == V_AMO) begin
      va_en    = 1'b1;
      va_be    = 4'hF;
      va_addr  = v_q.addr[2 +: VAW];
      va_wdata = amo_calc(v_q.amo, va_rdata, v_q.wdata);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vst        <= V_IDLE;
      mm_pending <= 1'b0;
      v_q        <= '0;
    end else begin
      if (m_accept)             mm_pending <= 1'b1;
      else if (mm_d_resp_valid) mm_pending <= 1'b0;
      unique case (vst)
        V_IDLE: if (v_accept) begin
          v_q <= d_req;
          vst <= (d_req.op == MEM_AMO) ? V_AMO : V_RESP;
        end
        V_AMO:   vst <= V_RESP;
        default: vst <= V_IDLE;
      endcase
    end
  end

  // responses
  logic [31:0] v_old;
  always_ff @(posedge clk) if (vst == V_AMO) v_old <= va_rdata;
  always_comb begin
    if (vst == V_RESP) begin
      d_resp_valid = 1'b1;
      d_resp.rdata = (v_q.op == MEM_AMO) ? v_old : va_rdata;
      d_resp.hit   = 1'b1;
    end else begin
      d_resp_valid = mm_d_resp_valid;
      d_resp       = mm_d_resp;
    end
  end
endmodule
