// iic_receiver: synchronous detector that recovers the message image.
//
// The receiver regenerates the carrier from the cover image (or a distorted
// copy of it): the same control circuit, ping-pong SIPOs and multiplexer as
// the transmitter cut the cover's most significant bit plane into 16-symbol
// words D. For each word the received modulated bit tin drives the controlled
// complementer: the word is kept when tin is 1 and inverted when tin is 0,
// giving an estimate F of the repetition-coded pixel. The redundancy remover
// takes 5-of-9 and 3-of-5 majorities and passes the two low bits, producing
// the 4-bit pixel m; a 4-bit PISO also sends it out serially on n, most
// significant bit first. The block structure follows the published receiver.
//
// Interface (this implementation's choice): tin must hold modulated bit k
// until t_ack, high in the cycle it is used. Cover symbols stream without
// pause from the first cycle after reset (cycle 0).
//
// Timing: cover symbols 16k..16k+15 and modulated bit k (taken in cycle
// 16k+17) give m with m_valid in cycle 16k+27, and n/n_valid in cycles
// 16k+28..16k+31. Reset is synchronous, active low.
module iic_receiver
  import iic_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  input  logic tin,
  output logic t_ack,
  output pix_t m,
  output logic m_valid,
  output logic n,
  output logic n_valid
);

  logic              din1, din2, enable1, enable2, sel_d1, load;
  logic [CTRL_W-1:0] phase;
  word_t             d1, d2, d, f;

  iic_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .din(din),
    .din1(din1), .din2(din2), .enable1(enable1), .enable2(enable2),
    .sel_d1(sel_d1), .load(load), .phase(phase)
  );

  iic_sipo u_sipo1 (.clk(clk), .rst_n(rst_n), .sin(din1), .en(enable1), .q(d1));
  iic_sipo u_sipo2 (.clk(clk), .rst_n(rst_n), .sin(din2), .en(enable2), .q(d2));

  iic_mux_array u_mux (.d1(d1), .d2(d2), .sel_d1(sel_d1), .d(d));

  iic_complementer u_cc (.d(d), .tout(tin), .f(f));

  iic_redundancy_remover u_rr (
    .clk(clk), .rst_n(rst_n), .load(load), .f(f), .m(m), .m_valid(m_valid)
  );

  iic_piso #(.W(MSG_W)) u_piso (
    .clk(clk), .rst_n(rst_n), .load(m_valid), .d(m), .sout(n), .active(n_valid)
  );

  assign t_ack = load;

endmodule
