// iic_ctrl: control circuit of the ping-pong input stage.
//
// A free-running 5-bit counter steers the serial cover stream: during counts
// 0..15 din is passed to SIPO-1 (din1) and during counts 16..31 to SIPO-2
// (din2), gated by counter bit 4. Enable1 is decoded from count 16, the first
// cycle in which SIPO-1 holds a complete 16-symbol word. Enable2 is the
// terminal count 31 passed through a D flip-flop, so it is high while the
// count is 0, when SIPO-2 has just completed its word. This follows the
// published control circuit.
//
// Added here: sel_d1 (= counter bit 4) selects which SIPO word the 16-way
// multiplexer passes on, and load, one cycle after either enable, tells the
// next stage that the multiplexer output holds a fresh word. Both occur every
// 16 cycles: load is high at counts 1 and 17 (not at count 1 right after
// reset, since no word is complete yet).
//
// Timing: the first symbol after reset is counted as cycle 0; the word of
// symbols 16k..16k+15 is on the multiplexer output when load is high in
// cycle 16k+17. Reset is synchronous, active low.
module iic_ctrl #(
  parameter int unsigned CTRL_W = iic_pkg::CTRL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              din,
  output logic              din1,
  output logic              din2,
  output logic              enable1,
  output logic              enable2,
  output logic              sel_d1,
  output logic              load,
  output logic [CTRL_W-1:0] phase
);

  localparam logic [CTRL_W-1:0] HALF = CTRL_W'(1) << (CTRL_W - 1);  // 16
  localparam logic [CTRL_W-1:0] TC   = '1;                          // 31

  logic [CTRL_W-1:0] cnt;
  logic              tc_q;    // D flip-flop on the terminal count
  logic              load_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      tc_q   <= 1'b0;
      load_q <= 1'b0;
    end else begin
      cnt    <= cnt + 1'b1;
      tc_q   <= (cnt == TC);
      load_q <= enable1 | enable2;
    end
  end

  always_comb begin
    din1    = din & ~cnt[CTRL_W-1];
    din2    = din &  cnt[CTRL_W-1];
    enable1 = (cnt == HALF);
    enable2 = tc_q;
    sel_d1  = cnt[CTRL_W-1];
    load    = load_q;
    phase   = cnt;
  end

endmodule
