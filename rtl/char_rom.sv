// char_rom: 5x7 dot-matrix character table of the display scope's character
// generator.
//
// 64 characters, code = ASCII - 0x20 (space through underscore: punctuation,
// digits and upper-case letters). For a character code and a column number
// 0..4 (left to right) it returns the column's seven dots, bit 0 the top row.
// Combinational. The document gives only the 5x7 matrix; the character set
// and the glyph shapes (a common 5x7 terminal font) are this design's choice.
// Each glyph is packed with column c in bits [7c+6 : 7c].
module char_rom (
  input  logic [5:0] code,
  input  logic [2:0] col,
  output logic [6:0] dots
);
  function automatic logic [34:0] glyph(input logic [5:0] c);
    logic [34:0] g;
    unique case (c)
      6'd0: g = 35'h000000000;  //  
      6'd1: g = 35'h00017c000;  // !
      6'd2: g = 35'h000e00380;  // "
      6'd3: g = 35'h14fe53f94;  // #
      6'd4: g = 35'h1255fd524;  // $
      6'd5: g = 35'h62c8209a3;  // %
      6'd6: g = 35'h5045564b6;  // &
      6'd7: g = 35'h00000c280;  // '
      6'd8: g = 35'h008288e00;  // (
      6'd9: g = 35'h00388a080;  // )
      6'd10: g = 35'h085471508;  // *
      6'd11: g = 35'h0810f8408;  // +
      6'd12: g = 35'h0000c2800;  // ,
      6'd13: g = 35'h081020408;  // -
      6'd14: g = 35'h000183000;  // .
      6'd15: g = 35'h020820820;  // /
      6'd16: g = 35'h3e8b268be;  // 0
      6'd17: g = 35'h0081fe100;  // 1
      6'd18: g = 35'h4693470c2;  // 2
      6'd19: g = 35'h3197160a1;  // 3
      6'd20: g = 35'h10fe48a18;  // 4
      6'd21: g = 35'h398b162a7;  // 5
      6'd22: g = 35'h30932653c;  // 6
      6'd23: g = 35'h030a27881;  // 7
      6'd24: g = 35'h3693264b6;  // 8
      6'd25: g = 35'h1e5326486;  // 9
      6'd26: g = 35'h0000d9b00;  // :
      6'd27: g = 35'h0000dab00;  // ;
      6'd28: g = 35'h008288a08;  // <
      6'd29: g = 35'h142850a14;  // =
      6'd30: g = 35'h001051141;  // >
      6'd31: g = 35'h061344082;  // ?
      6'd32: g = 35'h3e83e64b2;  // @
      6'd33: g = 35'h7e22448fe;  // A
      6'd34: g = 35'h3693264ff;  // B
      6'd35: g = 35'h2283060be;  // C
      6'd36: g = 35'h1c45060ff;  // D
      6'd37: g = 35'h4193264ff;  // E
      6'd38: g = 35'h0102244ff;  // F
      6'd39: g = 35'h32a3060be;  // G
      6'd40: g = 35'h7f102047f;  // H
      6'd41: g = 35'h0083fe080;  // I
      6'd42: g = 35'h017f06020;  // J
      6'd43: g = 35'h41445047f;  // K
      6'd44: g = 35'h40810207f;  // L
      6'd45: g = 35'h7f041017f;  // M
      6'd46: g = 35'h7f202027f;  // N
      6'd47: g = 35'h3e83060be;  // O
      6'd48: g = 35'h0612244ff;  // P
      6'd49: g = 35'h5e43460be;  // Q
      6'd50: g = 35'h4652644ff;  // R
      6'd51: g = 35'h3193264c6;  // S
      6'd52: g = 35'h0103fc081;  // T
      6'd53: g = 35'h3f810203f;  // U
      6'd54: g = 35'h1f410101f;  // V
      6'd55: g = 35'h7f406107f;  // W
      6'd56: g = 35'h632820a63;  // X
      6'd57: g = 35'h0309e0203;  // Y
      6'd58: g = 35'h438b268e1;  // Z
      6'd59: g = 35'h4183fc000;  // [
      6'd60: g = 35'h202020202;  // backslash
      6'd61: g = 35'h0001fe0c1;  // ]
      6'd62: g = 35'h040404104;  // ^
      6'd63: g = 35'h408102040;  // _
      default: g = '0;
    endcase
    return g;
  endfunction

  logic [34:0] gl;
  assign gl   = glyph(code);
  assign dots = (col < 3'd5) ? gl[7*col +: 7] : 7'd0;
endmodule
