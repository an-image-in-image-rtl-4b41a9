// iic_transmitter: spatial bi-phase modulator.
//
// The cover image's most significant bit plane arrives one symbol per clock
// on din. The control circuit steers it alternately into SIPO-1 and SIPO-2,
// 16 symbols each, so one SIPO fills while the other's word is compared. The
// 16-way multiplexer passes the complete word D to the comparator, where it is
// compared symbol by symbol with F, the current message pixel msg after
// repetition coding (9/5/1/1 copies of bits 3..0). If 9 or more of the 16
// positions match, the substring is "in phase" and tout is 1, else 0: one
// modulated bit per message pixel. The block structure follows the published
// transmitter.
//
// Interface (this implementation's choice): msg must hold message pixel k
// until msg_ack, which is high in the cycle it is used; the source then moves
// to pixel k+1. Cover symbols stream without pause from the first cycle after
// reset (cycle 0).
//
// Timing: cover symbols 16k..16k+15 and message pixel k (taken in cycle
// 16k+17) give tout with tout_valid in cycle 16k+35; a result every 16 cycles.
// The word on D is held for 32 cycles after its load, so the comparison one
// cycle after load still sees it.
// Reset is synchronous, active low.
module iic_transmitter
  import iic_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  input  pix_t msg,
  output logic msg_ack,
  output logic tout,
  output logic tout_valid
);

  logic              din1, din2, enable1, enable2, sel_d1, load;
  logic              cmp_load;
  logic [CTRL_W-1:0] phase;
  word_t             d1, d2, d, f;
  logic [CNT_W-1:0]  match_cnt;

  iic_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .din(din),
    .din1(din1), .din2(din2), .enable1(enable1), .enable2(enable2),
    .sel_d1(sel_d1), .load(load), .phase(phase)
  );

  iic_sipo u_sipo1 (.clk(clk), .rst_n(rst_n), .sin(din1), .en(enable1), .q(d1));
  iic_sipo u_sipo2 (.clk(clk), .rst_n(rst_n), .sin(din2), .en(enable2), .q(d2));

  iic_mux_array u_mux (.d1(d1), .d2(d2), .sel_d1(sel_d1), .d(d));

  // The pixel is coded into F in the load cycle; the comparison follows one
  // cycle later, while D still holds the same word.
  iic_redundancy_intro u_red (.clk(clk), .rst_n(rst_n), .take(load), .m(msg), .f(f));

  always_ff @(posedge clk) begin
    if (!rst_n) cmp_load <= 1'b0;
    else        cmp_load <= load;
  end

  iic_cmp_majority u_maj (
    .clk(clk), .rst_n(rst_n), .load(cmp_load), .d(d), .f(f),
    .tout(tout), .tout_valid(tout_valid), .match_cnt(match_cnt)
  );

  assign msg_ack = load;

endmodule
