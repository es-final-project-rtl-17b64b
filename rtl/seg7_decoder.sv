// seg7_decoder: drives one 7-segment digit from a 4-bit display-buffer
// code.
//
// Codes 0..9 show the decimal digit; codes A..F show the glyphs of
// bjc_pkg::glyph_e (P, L, y, H, d and a minus sign) used for the play/wait
// instruction letters and for a negative count. Output seg[6:0] =
// {g,f,e,d,c,b,a}, active low as the board's displays are driven.
// Purely combinational. The six 4-bit digits follow the described
// display interface; the glyph set and polarity are this design's choice.
module seg7_decoder
  import bjc_pkg::*;
(
  input  logic [3:0] code,
  output logic [6:0] seg_n
);
  logic [6:0] seg;   // active high, {g,f,e,d,c,b,a}
  always_comb begin
    unique case (code)
      4'd0:    seg = 7'b0111111;
      4'd1:    seg = 7'b0000110;
      4'd2:    seg = 7'b1011011;
      4'd3:    seg = 7'b1001111;
      4'd4:    seg = 7'b1100110;
      4'd5:    seg = 7'b1101101;
      4'd6:    seg = 7'b1111101;
      4'd7:    seg = 7'b0000111;
      4'd8:    seg = 7'b1111111;
      4'd9:    seg = 7'b1101111;
      G_P:     seg = 7'b1110011;
      G_L:     seg = 7'b0111000;
      G_Y:     seg = 7'b1101110;
      G_H:     seg = 7'b1110110;
      G_D:     seg = 7'b1011110;
      default: seg = 7'b1000000;   // G_MINUS
    endcase
  end
  assign seg_n = ~seg;
endmodule
