// iic_pkg: constants shared by the image-in-image transmitter and receiver.
//
// A 4-bit message pixel is carried by a substring of 16 cover symbols (most
// significant bit plane of the cover image). Channel coding repeats message
// bit 3 nine times, bit 2 five times and bits 1 and 0 once (9+5+1+1 = 16).
// The transmitter sends 1 when 9 or more of the 16 symbols agree with the
// coded message; the receiver takes majorities of 5-of-9 and 3-of-5.
// These numbers follow the published scheme; the helper functions below are
// this implementation's own way of expressing them.
package iic_pkg;

  localparam int unsigned SUB_LEN    = 16;  // symbols per substring
  localparam int unsigned MSG_W      = 4;   // bits per message pixel
  localparam int unsigned CTRL_W     = 5;   // width of the ping-pong control counter
  localparam int unsigned CNT_W      = 4;   // width of the majority counters
  localparam int unsigned MAJ_THRESH = 9;   // matches needed for a modulated 1

  // Repetition count of each message bit, index = bit position.
  localparam int unsigned REP3 = 9;
  localparam int unsigned REP2 = 5;
  localparam int unsigned REP1 = 1;
  localparam int unsigned REP0 = 1;

  // Majority thresholds of the redundancy remover: more than half.
  localparam int unsigned THR3 = REP3 / 2 + 1;  // 5 of 9
  localparam int unsigned THR2 = REP2 / 2 + 1;  // 3 of 5

  typedef logic [SUB_LEN-1:0] word_t;
  typedef logic [MSG_W-1:0]   pix_t;

  // Channel coding of one message pixel: bit 3 fills word[15:7], bit 2
  // word[6:2], bit 1 word[1] and bit 0 word[0]. The highest word bit is the
  // first symbol of a substring.
  function automatic word_t extend_pixel(pix_t m);
    word_t w;
    w = {{REP3{m[3]}}, {REP2{m[2]}}, {REP1{m[1]}}, {REP0{m[0]}}};
    return w;
  endfunction

endpackage
