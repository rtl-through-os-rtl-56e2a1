// vram: dual-ported, dual-clocked video memory.
//
// WORDS x 32-bit words. Port A belongs to the core's data path (clock
// clk_a, the core clock): a read or a byte-enabled write is presented with
// a_en and the read word appears on a_rdata on the next clk_a edge
// (read-before-write). Port B belongs to the VGA controller (clock clk_b,
// the 100 MHz video-memory clock of the document) and only reads, also
// with one cycle of latency. The document gives the two ports and the two
// clocks; the size and the word layout (text cells, then a character
// generator area, see vga_controller) are this design's choice.
module vram #(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk_a,
  input  logic        a_en,
  input  logic [3:0]  a_be,
  input  logic [$clog2(WORDS)-1:0] a_addr,
  input  logic [31:0] a_wdata,
  output logic [31:0] a_rdata,
  input  logic        clk_b,
  input  logic [$clog2(WORDS)-1:0] b_addr,
  output logic [31:0] b_rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk_a) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      for (int i = 0; i < 4; i++)
        if (a_be[i]) mem[a_addr][i*8 +: 8] <= a_wdata[i*8 +: 8];
    end
  end

  always_ff @(posedge clk_b) b_rdata <= mem[b_addr];
endmodule
