// keyboard_controller: PS/2 keyboard receiver that delivers ASCII
// characters to the core as an interrupt.
//
// The PS/2 clock and data lines are synchronised into the core clock
// domain. On every falling edge of the PS/2 clock one bit of an 11-bit frame
// is shifted in (start 0, eight data bits LSB first, odd parity, stop 1); a
// frame with a bad start, parity or stop bit is dropped, and a frame left
// incomplete for TIMEOUT cycles is abandoned. Complete scan codes (the
// keyboard's default scan code set 2) are decoded: 0xF0 marks the next code
// as a key release, 0xE0 marks an extended key (ignored), the two Shift keys
// are tracked, and the press of a printable key is translated to ASCII
// (letters, digits, punctuation, space, Enter = 0x0A, Backspace, Tab, Esc).
// The character is held in `char_data` with `char_valid` high, which is the
// interrupt request, until the core acknowledges it with `ack`; characters
// arriving while one is held are lost.
// Delivery of ASCII characters by interrupt follows the document; the frame
// handling, the key map and the one-character buffer are this design's own.
module keyboard_controller #(
  parameter int unsigned TIMEOUT = 65536
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic [7:0] char_data,
  output logic       char_valid,
  input  logic       ack
);
  logic [2:0] clk_s, dat_s;
  always_ff @(posedge clk) begin
    if (rst) begin
      clk_s <= 3'b111;
      dat_s <= 3'b111;
    end else begin
      clk_s <= {clk_s[1:0], ps2_clk};
      dat_s <= {dat_s[1:0], ps2_data};
    end
  end
  logic fall;
  assign fall = clk_s[2] && !clk_s[1];

  logic [10:0] sh;
  logic [3:0]  nbits;
  logic [$clog2(TIMEOUT)-1:0] idle;
  logic        code_valid;
  logic [7:0]  code;

  always_ff @(posedge clk) begin
    code_valid <= 1'b0;
    if (rst) begin
      nbits <= '0;
      idle  <= '0;
      sh    <= '0;
      code  <= '0;
    end else if (fall) begin
      idle <= '0;
      sh   <= {dat_s[1], sh[10:1]};
      if (nbits == 4'd10) begin
        nbits <= '0;
        // sh[1] is the start bit, sh[9:2] data, sh[10] parity, new bit = stop
        if (!sh[1] && dat_s[1] && (^{sh[10:2]})) begin
          code_valid <= 1'b1;
          code       <= sh[9:2];
        end
      end else begin
        nbits <= nbits + 4'd1;
      end
    end else if (nbits != 0) begin
      if (idle == $clog2(TIMEOUT)'(TIMEOUT - 1)) nbits <= '0;
      else idle <= idle + 1'b1;
    end
  end

  function automatic logic [7:0] to_ascii(input logic [7:0] c, input logic shift);
    logic [7:0] a;
    a = 8'h00;
    unique case (c)
      8'h1C: a = "a"; 8'h32: a = "b"; 8'h21: a = "c"; 8'h23: a = "d";
      8'h24: a = "e"; 8'h2B: a = "f"; 8'h34: a = "g"; 8'h33: a = "h";
      8'h43: a = "i"; 8'h3B: a = "j"; 8'h42: a = "k"; 8'h4B: a = "l";
      8'h3A: a = "m"; 8'h31: a = "n"; 8'h44: a = "o"; 8'h4D: a = "p";
      8'h15: a = "q"; 8'h2D: a = "r"; 8'h1B: a = "s"; 8'h2C: a = "t";
      8'h3C: a = "u"; 8'h2A: a = "v"; 8'h1D: a = "w"; 8'h22: a = "x";
      8'h35: a = "y"; 8'h1A: a = "z";
      8'h45: a = shift ? ")" : "0"; 8'h16: a = shift ? "!" : "1";
      8'h1E: a = shift ? "@" : "2"; 8'h26: a = shift ? "#" : "3";
      8'h25: a = shift ? "$" : "4"; 8'h2E: a = shift ? "%" : "5";
      8'h36: a = shift ? "^" : "6"; 8'h3D: a = shift ? "&" : "7";
      8'h3E: a = shift ? "*" : "8"; 8'h46: a = shift ? "(" : "9";
      8'h4E: a = shift ? "_" : "-"; 8'h55: a = shift ? "+" : "=";
      8'h54: a = shift ? "{" : "["; 8'h5B: a = shift ? "}" : "]";
      8'h4C: a = shift ? ":" : ";"; 8'h52: a = shift ? "\"" : "'";
      8'h41: a = shift ? "<" : ","; 8'h49: a = shift ? ">" : ".";
      8'h4A: a = shift ? "?" : "/"; 8'h5D: a = shift ? "|" : "\\";
      8'h0E: a = shift ? "~" : "`";
      8'h29: a = " ";
      8'h5A: a = 8'h0A;
      8'h66: a = 8'h08;
      8'h0D: a = 8'h09;
      8'h76: a = 8'h1B;
      default: a = 8'h00;
    endcase
    if (shift && a >= "a" && a <= "z") a = a - 8'h20;
    return a;
  endfunction

  logic brk, ext, lshift, rshift;
  logic [7:0] asc;
  assign asc = to_ascii(code, lshift || rshift);

  always_ff @(posedge clk) begin
    if (rst) begin
      brk        <= 1'b0;
      ext        <= 1'b0;
      lshift     <= 1'b0;
      rshift     <= 1'b0;
      char_valid <= 1'b0;
      char_data  <= '0;
    end else begin
      if (ack) char_valid <= 1'b0;
      if (code_valid) begin
        if (code == 8'hF0) brk <= 1'b1;
        else if (code == 8'hE0) ext <= 1'b1;
        else begin
          brk <= 1'b0;
          ext <= 1'b0;
          if (!ext) begin
            if (code == 8'h12)      lshift <= !brk;
            else if (code == 8'h59) rshift <= !brk;
            else if (!brk && asc != 8'h00 && (!char_valid || ack)) begin
              char_data  <= asc;
              char_valid <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
