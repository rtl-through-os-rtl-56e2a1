// cache: storage of the unified direct-mapped instruction and data cache.
//
// CACHE_BYTES of data in lines of LINE_BYTES (4 KB and 64 B in the
// document: 64 lines of 16 words). An address splits into tag [31:IDX_LSB+IW],
// index and word offset. The arrays are read combinationally, which gives
// the single-cycle hit of the document: the fetch port and the data port
// each look up their own address and report hit and word in the same cycle.
// Writes happen on the clock edge: a data-port word write (store or AMO
// result, byte enables, marks the line dirty) or a whole-line fill from
// DRAM (marks it valid and clean). The victim port exposes the line at an
// index for write-back. The main memory's FSMs decide who may use which
// port; a fill and a word write are never requested in the same cycle.
// Write-back with dirty bits is this design's choice; size, line length,
// direct mapping, dual porting and single-cycle hit follow the document.
module cache #(
  parameter int unsigned CACHE_BYTES = 4096,
  parameter int unsigned LINE_BYTES  = 64
) (
  input  logic        clk,
  input  logic        rst,
  // fetch lookup
  input  logic [31:0] f_addr,
  output logic        f_hit,
  output logic [31:0] f_data,
  // data lookup and word write
  input  logic [31:0] d_addr,
  output logic        d_hit,
  output logic [31:0] d_data,
  input  logic        d_we,
  input  logic [3:0]  d_be,
  input  logic [31:0] d_wdata,
  // line fill
  input  logic        fill_we,
  input  logic [31:0] fill_addr,
  input  logic [LINE_BYTES*8-1:0] fill_line,
  // victim inspection (at fill_addr's index)
  output logic        v_valid,
  output logic        v_dirty,
  output logic [31:0] v_addr,
  output logic [LINE_BYTES*8-1:0] v_line
);
  import rv_pkg::*;

  localparam int unsigned LINES = CACHE_BYTES / LINE_BYTES;
  localparam int unsigned WORDS = LINE_BYTES / 4;
  localparam int unsigned OW    = $clog2(WORDS);
  localparam int unsigned IW    = $clog2(LINES);
  localparam int unsigned IDX_LSB = OW + 2;
  localparam int unsigned TAG_LSB = IDX_LSB + IW;
  localparam int unsigned TW    = 32 - TAG_LSB;

  logic [31:0]   data  [LINES][WORDS];
  logic [TW-1:0] tag   [LINES];
  logic          valid [LINES];
  logic          dirty [LINES];

  logic [IW-1:0] fi, di, vi;
  logic [OW-1:0] fo, dof;
  assign fi  = f_addr[IDX_LSB +: IW];
  assign fo  = f_addr[2 +: OW];
  assign di  = d_addr[IDX_LSB +: IW];
  assign dof = d_addr[2 +: OW];
  assign vi  = fill_addr[IDX_LSB +: IW];

  assign f_hit  = valid[fi] && tag[fi] == f_addr[31:TAG_LSB];
  assign f_data = data[fi][fo];
  assign d_hit  = valid[di] && tag[di] == d_addr[31:TAG_LSB];
  assign d_data = data[di][dof];

  assign v_valid = valid[vi];
  assign v_dirty = dirty[vi];
  assign v_addr  = {tag[vi], vi, {IDX_LSB{1'b0}}};
  always_comb
    for (int w = 0; w < WORDS; w++) v_line[w*32 +: 32] = data[vi][w];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LINES; i++) begin
        valid[i] <= 1'b0;
        dirty[i] <= 1'b0;
      end
    end else if (fill_we) begin
      valid[vi] <= 1'b1;
      dirty[vi] <= 1'b0;
      tag[vi]   <= fill_addr[31:TAG_LSB];
      for (int w = 0; w < WORDS; w++) data[vi][w] <= fill_line[w*32 +: 32];
    end else if (d_we) begin
      dirty[di]     <= 1'b1;
      data[di][dof] <= merge_be(data[di][dof], d_wdata, d_be);
    end
  end
endmodule
