// vga_controller: 80 x 30 colour text-mode display, 640 x 480 at 60 Hz.
//
// It runs on the 100 MHz video-memory clock, four times the 25 MHz pixel
// rate as in the document, and spends the four clock cycles of each pixel
// on two video-memory reads: phase 0 presents the address of the text cell
// under the pixel, phase 1 uses the returned cell to address the glyph row
// in the character generator area, phase 2 picks the glyph bit, and phase 3
// registers the pixel colour and the sync outputs and steps the counters.
// Timing is the standard 640x480 one: 800 clocks per line (640 visible,
// 16 front porch, 96 sync, 48 back porch) and 525 lines (480, 10, 2, 33),
// both syncs active low.
// Video memory layout (32-bit words): word row*80+col is a cell, bits [7:0]
// the character, [11:8] the foreground and [15:12] the background colour.
// Words FONT_BASE.. hold the character generator, 16 bytes per character,
// one byte per glyph row with the leftmost pixel in bit 7, four bytes per
// word little-endian; software loads it. Colours are 4-bit IRGB mapped to
// the 4-bit-per-channel VGA outputs. The text mode with colours and the
// clock ratio follow the document; the layout, the writable character
// generator and the palette are this design's choices.
module vga_controller #(
  parameter int unsigned VRAM_WORDS = 4096,
  parameter int unsigned FONT_BASE  = 3072
) (
  input  logic       clk,        // video-memory clock, 4x pixel clock
  input  logic       rst,
  output logic [$clog2(VRAM_WORDS)-1:0] vram_addr,
  input  logic [31:0] vram_rdata,
  output logic [3:0] vga_r,
  output logic [3:0] vga_g,
  output logic [3:0] vga_b,
  output logic       vga_hs,
  output logic       vga_vs
);
  localparam int unsigned AW = $clog2(VRAM_WORDS);
  localparam int unsigned H_VIS = 640, H_FP = 16, H_SY = 96, H_BP = 48;
  localparam int unsigned V_VIS = 480, V_FP = 10, V_SY = 2,  V_BP = 33;
  localparam int unsigned H_TOT = H_VIS + H_FP + H_SY + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SY + V_BP;

  logic [1:0] phase;
  logic [9:0] hc, vc;
  logic [31:0] cell_q;
  logic        bit_q;

  logic visible;
  assign visible = (hc < 10'(H_VIS)) && (vc < 10'(V_VIS));

  logic [11:0] cell_idx;
  logic [11:0] font_byte;
  always_comb begin
    cell_idx  = 12'(vc[9:4]) * 12'd80 + 12'(hc[9:3]);
    font_byte = {(phase == 2'd1) ? vram_rdata[7:0] : cell_q[7:0], vc[3:0]};
    if (phase == 2'd0) vram_addr = AW'(cell_idx);
    else               vram_addr = AW'(FONT_BASE) + AW'(font_byte[11:2]);
  end

  function automatic logic [3:0] level(input logic c, input logic i);
    return (c ? 4'hA : 4'h0) + (i ? 4'h5 : 4'h0);
  endfunction

  logic [3:0] col;
  assign col = bit_q ? cell_q[11:8] : cell_q[15:12];

  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= '0;
      hc     <= '0;
      vc     <= '0;
      vga_r  <= '0;
      vga_g  <= '0;
      vga_b  <= '0;
      vga_hs <= 1'b1;
      vga_vs <= 1'b1;
      cell_q <= '0;
      bit_q  <= 1'b0;
    end else begin
      phase <= phase + 2'd1;
      unique case (phase)
        2'd0: ;                                   // cell address presented
        2'd1: cell_q <= vram_rdata;               // cell read; glyph address presented
        2'd2: begin                               // glyph word read
          bit_q <= vram_rdata[font_byte[1:0]*8 + (7 - hc[2:0])];
        end
        default: begin
          vga_r  <= visible ? level(col[2], col[3]) : 4'h0;
          vga_g  <= visible ? level(col[1], col[3]) : 4'h0;
          vga_b  <= visible ? level(col[0], col[3]) : 4'h0;
          vga_hs <= !((hc >= 10'(H_VIS + H_FP)) && (hc < 10'(H_VIS + H_FP + H_SY)));
          vga_vs <= !((vc >= 10'(V_VIS + V_FP)) && (vc < 10'(V_VIS + V_FP + V_SY)));
          if (hc == 10'(H_TOT - 1)) begin
            hc <= '0;
            vc <= (vc == 10'(V_TOT - 1)) ? '0 : vc + 10'd1;
          end else begin
            hc <= hc + 10'd1;
          end
        end
      endcase
    end
  end
endmodule
