// main_memory: the cached main-memory module behind the fetch and data ports.
//
// Three FSMs share the cache:
//  * The fetch control FSM takes one fetch request at a time (IDLE -> LOOK).
//    In LOOK the registered address is looked up; on a hit the word is
//    returned that cycle and a new request may be taken in the same cycle,
//    so a stream of hits runs at one fetch per clock. On a miss it hands the
//    cache over to the DRAM control FSM (MISS) and looks up again when the
//    line has been filled.
//  * The data control FSM does the same for loads, stores and AMOs. A store
//    merges its byte-enabled word into the line and marks it dirty; an AMO
//    reads the old word, writes the combined value and returns the old word,
//    all in the one hit cycle.
//  * The DRAM control FSM serves one miss at a time (data before fetch):
//    if the victim line is dirty it is written back, then the missing line is
//    read and filled. While it works, neither port may use the cache, as the
//    document describes.
// The translation (TLB) step of the document is a pass-through and so is
// not present. The response's `hit` flag tells whether the access needed
// DRAM, for the performance counters. One pending operation per port follows
// the document; the write-back policy and the arbitration order are this
// design's choices.
module main_memory #(
  parameter int unsigned CACHE_BYTES = 4096,
  parameter int unsigned LINE_BYTES  = 64
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
  // line interface to the DRAM controller
  output logic              line_req_valid,
  input  logic              line_req_ready,
  output logic              line_req_we,
  output logic [31:0]       line_req_addr,
  output logic [LINE_BYTES*8-1:0] line_wdata,
  input  logic              line_done,
  input  logic [LINE_BYTES*8-1:0] line_rdata
);
  import rv_pkg::*;

  typedef enum logic [1:0] {P_IDLE, P_LOOK, P_MISS} port_st_e;
  typedef enum logic [2:0] {D_IDLE, D_WB_REQ, D_WB_WAIT, D_RD_REQ, D_RD_WAIT, D_FILL} dram_st_e;

  port_st_e    fst, dst;
  dram_st_e    mst;
  logic [31:0] f_addr_q;
  mem_req_t    d_q;
  logic        f_missed, d_missed;
  logic        serve_data;          // DRAM FSM is serving the data port
  logic [31:0] miss_addr;
  logic [LINE_BYTES*8-1:0] fill_buf;

  // cache
  logic        c_f_hit, c_d_hit, c_d_we, c_fill_we;
  logic [31:0] c_f_data, c_d_data, c_d_wdata, c_v_addr;
  logic [3:0]  c_d_be;
  logic        c_v_valid, c_v_dirty;
  logic [LINE_BYTES*8-1:0] c_v_line;

  cache #(.CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES)) u_cache (
    .clk, .rst,
    .f_addr(f_addr_q), .f_hit(c_f_hit), .f_data(c_f_data),
    .d_addr(d_q.addr), .d_hit(c_d_hit), .d_data(c_d_data),
    .d_we(c_d_we), .d_be(c_d_be), .d_wdata(c_d_wdata),
    .fill_we(c_fill_we), .fill_addr(miss_addr), .fill_line(fill_buf),
    .v_valid(c_v_valid), .v_dirty(c_v_dirty), .v_addr(c_v_addr), .v_line(c_v_line)
  );

  logic cache_free, f_hit_now, d_hit_now;
  assign cache_free = (mst == D_IDLE);
  assign f_hit_now  = (fst == P_LOOK) && cache_free && c_f_hit;
  assign d_hit_now  = (dst == P_LOOK) && cache_free && c_d_hit;

  // responses
  assign f_resp_valid = f_hit_now;
  assign f_resp.rdata = c_f_data;
  assign f_resp.hit   = !f_missed;
  assign d_resp_valid = d_hit_now;
  assign d_resp.rdata = c_d_data;
  assign d_resp.hit   = !d_missed;

  assign f_req_ready = (fst == P_IDLE) || f_hit_now;
  assign d_req_ready = (dst == P_IDLE) || d_hit_now;

  // cache word write on a data hit
  always_comb begin
    c_d_we    = 1'b0;
    c_d_be    = d_q.be;
    c_d_wdata = d_q.wdata;
    if (d_hit_now) begin
      if (d_q.op == MEM_STORE) begin
        c_d_we = 1'b1;
      end else if (d_q.op == MEM_AMO) begin
        c_d_we    = 1'b1;
        c_d_be    = 4'hF;
        c_d_wdata = amo_calc(d_q.amo, c_d_data, d_q.wdata);
      end
    end
  end

  // DRAM line requests
  assign line_req_valid = (mst == D_WB_REQ && c_v_valid && c_v_dirty) || (mst == D_RD_REQ);
  assign line_req_we    = (mst == D_WB_REQ);
  assign line_req_addr  = (mst == D_WB_REQ) ? c_v_addr : {miss_addr[31:$clog2(LINE_BYTES)], {$clog2(LINE_BYTES){1'b0}}};
  assign line_wdata     = c_v_line;
  assign c_fill_we      = (mst == D_FILL);

  always_ff @(posedge clk) begin
    if (rst) begin
      fst        <= P_IDLE;
      dst        <= P_IDLE;
      mst        <= D_IDLE;
      f_missed   <= 1'b0;
      d_missed   <= 1'b0;
      serve_data <= 1'b0;
      f_addr_q   <= '0;
      d_q        <= '0;
      miss_addr  <= '0;
    end else begin
      // fetch control FSM
      unique case (fst)
        P_IDLE, P_LOOK: begin
          if (fst == P_LOOK && !f_hit_now) begin
            if (cache_free) fst <= P_MISS;     // miss: wait for the DRAM FSM
          end else if (f_req_valid) begin
            fst      <= P_LOOK;
            f_addr_q <= f_req_addr;
            f_missed <= 1'b0;
          end else begin
            fst <= P_IDLE;
          end
        end
        P_MISS: if (mst == D_FILL && !serve_data) begin
          fst      <= P_LOOK;
          f_missed <= 1'b1;
        end
        default: fst <= P_IDLE;
      endcase

      // data control FSM
      unique case (dst)
        P_IDLE, P_LOOK: begin
          if (dst == P_LOOK && !d_hit_now) begin
            if (cache_free) dst <= P_MISS;
          end else if (d_req_valid) begin
            dst      <= P_LOOK;
            d_q      <= d_req;
            d_missed <= 1'b0;
          end else begin
            dst <= P_IDLE;
          end
        end
        P_MISS: if (mst == D_FILL && serve_data) begin
          dst      <= P_LOOK;
          d_missed <= 1'b1;
        end
        default: dst <= P_IDLE;
      endcase

      // DRAM control FSM
      unique case (mst)
        D_IDLE: begin
          if (dst == P_MISS) begin
            serve_data <= 1'b1;
            miss_addr  <= d_q.addr;
            mst        <= D_WB_REQ;
          end else if (fst == P_MISS) begin
            serve_data <= 1'b0;
            miss_addr  <= f_addr_q;
            mst        <= D_WB_REQ;
          end
        end
        D_WB_REQ: begin
          if (!(c_v_valid && c_v_dirty)) mst <= D_RD_REQ;
          else if (line_req_ready)       mst <= D_WB_WAIT;
        end
        D_WB_WAIT: if (line_done) mst <= D_RD_REQ;
        D_RD_REQ:  if (line_req_ready) mst <= D_RD_WAIT;
        D_RD_WAIT: if (line_done) begin
          fill_buf <= line_rdata;
          mst      <= D_FILL;
        end
        D_FILL:    mst <= D_IDLE;
        default:   mst <= D_IDLE;
      endcase
    end
  end

  // A write-back request is only made for a dirty victim
  a_wb_dirty: assert property (@(posedge clk) disable iff (rst)
    (line_req_valid && line_req_we) |-> (c_v_valid && c_v_dirty));
endmodule
