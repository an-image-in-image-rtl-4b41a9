// iic_top: image-in-image communication, transmitter and receiver ends.
//
// The scheme hides nothing in the cover image: the sender derives from the
// cover's most significant bit plane and a 4-bit grey message image a binary
// "modulated" image with one bit per message pixel (one bit per 16 cover
// pixels), and only that binary image is sent. A receiver that has the same
// cover image, or a distorted copy of it, recovers the message from it.
//
// Both ends take 8-bit cover pixels in raster order, one per clock, and use
// bit 7. The two ends run from one clock but have their own resets and ports,
// because the channel between them (secure or noisy, possibly a store of the
// whole modulated image) is outside the design: tx_tout of substring k is
// produced in cycle 16k+35 of the transmitter's run, whereas the receiver
// needs modulated bit k in cycle 16k+17 of its own run.
//
// Timing of each end: see iic_transmitter and iic_receiver.
module iic_top
  import iic_pkg::*;
(
  input  logic       clk,
  // transmitter end
  input  logic       tx_rst_n,
  input  logic [7:0] tx_cover_pix,
  input  pix_t       tx_msg,
  output logic       tx_msg_ack,
  output logic       tx_tout,
  output logic       tx_tout_valid,
  // receiver end
  input  logic       rx_rst_n,
  input  logic [7:0] rx_cover_pix,
  input  logic       rx_tin,
  output logic       rx_t_ack,
  output pix_t       rx_m,
  output logic       rx_m_valid,
  output logic       rx_n,
  output logic       rx_n_valid
);

  iic_transmitter u_tx (
    .clk(clk), .rst_n(tx_rst_n), .din(tx_cover_pix[7]),
    .msg(tx_msg), .msg_ack(tx_msg_ack), .tout(tx_tout), .tout_valid(tx_tout_valid)
  );

  iic_receiver u_rx (
    .clk(clk), .rst_n(rx_rst_n), .din(rx_cover_pix[7]),
    .tin(rx_tin), .t_ack(rx_t_ack), .m(rx_m), .m_valid(rx_m_valid),
    .n(rx_n), .n_valid(rx_n_valid)
  );

endmodule
