// video_card: memory-mapped display driver for the i281.
//
// Data memory bytes 0..7 are wired to the eight 7-segment displays
// (byte i -> display i); a program "draws" by storing to those addresses and
// the display follows on the same cycle. In normal mode each display shows
// the hexadecimal digit of its byte's four least significant bits (bits 7..4
// are ignored). In video game mode (game_mode = 1) a second set of decoders
// is used instead: bit k of the byte (k = 0..6) lights segment k directly,
// so a program can draw any shape; bit 7 is unused. Bytes 8..15 are not
// displayed. Combinational. The mapping follows the published description
// of the video memory; how game mode is entered is left to the top level.
module video_card
  import i281_pkg::*;
(
  input  logic [7:0][7:0] mem_lo,
  input  logic            game_mode,
  output logic [7:0][6:0] hex
);

  for (genvar i = 0; i < 8; i++) begin : g_digit
    logic [6:0] hex_seg;

    hex7seg u_hex (.nibble(mem_lo[i][3:0]), .seg(hex_seg));

    assign hex[i] = game_mode ? mem_lo[i][6:0] : hex_seg;
  end

endmodule
