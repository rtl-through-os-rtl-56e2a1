// branch_predictor: a table of ENTRIES two-bit saturating counters.
//
// The table is indexed by the word address of the instruction (pc[2 +: log2
// ENTRIES]), with no tag. The fetch stage IF1 reads the counter of the pc it
// is fetching (combinational read); the upper counter bit is the
// taken/not-taken prediction. When a branch or jump is resolved in EX2, its
// counter is moved one step toward the actual outcome, saturating at 0 and 3.
// The entry count (128) and the 2-bit counters follow the document; the
// indexing and the reset value (1, weakly not taken) are this design's choice.
module branch_predictor #(
  parameter int unsigned ENTRIES = 128
) (
  input  logic        clk,
  input  logic        rst,
  // lookup (IF1)
  input  logic [31:0] lookup_pc,
  output logic        predict_taken,
  // update (EX2)
  input  logic        upd_valid,
  input  logic [31:0] upd_pc,
  input  logic        upd_taken
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [1:0] ctr [ENTRIES];

  logic [IW-1:0] li, ui;
  assign li = lookup_pc[2 +: IW];
  assign ui = upd_pc[2 +: IW];
  assign predict_taken = ctr[li][1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++) ctr[i] <= 2'b01;
    end else if (upd_valid) begin
      if (upd_taken && ctr[ui] != 2'b11) ctr[ui] <= ctr[ui] + 2'd1;
      else if (!upd_taken && ctr[ui] != 2'b00) ctr[ui] <= ctr[ui] - 2'd1;
    end
  end
endmodule
