// iic_redundancy_intro: channel coder of the transmitter.
//
// Holds the extended string F of the message pixel being modulated. When
// take is high the pixel m is captured and coded by repetition: m[3] is
// repeated 9 times into f[15:7], m[2] 5 times into f[6:2], and m[1] and m[0]
// appear once in f[1] and f[0]. More copies protect the bit planes that
// matter most to the eye. f holds until the next take, so the message source
// only has to present a pixel in the cycle it is taken.
//
// The repetition counts follow the published scheme. The placement (most
// significant bit first in the substring) and the register that holds F are
// this implementation's choices.
//
// Timing: take in cycle T gives the coded pixel on f from cycle T+1.
// Reset (synchronous, active low) clears f.
module iic_redundancy_intro
  import iic_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  take,
  input  pix_t  m,
  output word_t f
);

  always_ff @(posedge clk) begin
    if (!rst_n)    f <= '0;
    else if (take) f <= extend_pixel(m);
  end

endmodule
