// iic_cmp_majority: similarity comparator and majority encoder.
//
// On load, sixteen XNOR gates compare the cover substring d with the coded
// message f and the 16 match bits are loaded into a PISO. In the next 16
// cycles the PISO output drives the clock enable of a 4-bit match counter,
// so the counter adds up the matching positions. A second 4-bit counter,
// restarted by load, reaches its terminal count on the 16th symbol; that
// terminal count, delayed by a D flip-flop, is the counter's Clr and marks
// the cycle in which the counter holds the whole substring's match count.
// The encoder gives tout = 1 when the count is 9 or more (for a 4-bit count
// this is Q3 AND (Q2 OR Q1 OR Q0)). This structure follows the published
// majority encoder.
//
// Choices of this implementation: the match counter holds at 15 instead of
// wrapping, so a full 16-symbol match still encodes 1; in the Clr cycle the
// counter restarts at the current PISO bit, so back-to-back substrings lose
// no symbol; tout_valid is the Clr pulse.
//
// Timing: with load in cycle L, the match bits reach the counter in cycles
// L+1..L+16 and tout/tout_valid are valid in cycle L+17. Loads may follow
// each other every 16 cycles. Reset is synchronous, active low.
module iic_cmp_majority #(
  parameter int unsigned SUB_LEN    = iic_pkg::SUB_LEN,
  parameter int unsigned CNT_W      = iic_pkg::CNT_W,
  parameter int unsigned MAJ_THRESH = iic_pkg::MAJ_THRESH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [SUB_LEN-1:0] d,
  input  logic [SUB_LEN-1:0] f,
  output logic               tout,
  output logic               tout_valid,
  output logic [CNT_W-1:0]   match_cnt
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;
  localparam logic [CNT_W-1:0] SEG_TC  = CNT_W'(SUB_LEN - 1);

  logic [SUB_LEN-1:0] similar;    // XNOR comparator output
  logic               piso_bit;
  logic               piso_active;
  logic [CNT_W-1:0]   ones;       // match counter
  logic [CNT_W-1:0]   seg;        // terminal-count counter
  logic               pending;    // a loaded substring is being counted
  logic               clr;        // terminal count through a D flip-flop

  always_comb similar = ~(d ^ f);

  iic_piso #(.W(SUB_LEN)) u_piso (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (load),
    .d      (similar),
    .sout   (piso_bit),
    .active (piso_active)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ones    <= '0;
      seg     <= '0;
      pending <= 1'b0;
      clr     <= 1'b0;
    end else begin
      // match counter: Clr has priority and restarts with the current bit
      if (clr)
        ones <= CNT_W'(piso_bit);
      else if (piso_bit && ones != CNT_MAX)
        ones <= ones + 1'b1;
      // terminal-count counter, restarted with every substring
      if (load) seg <= '0;
      else      seg <= seg + 1'b1;
      if (load)                     pending <= 1'b1;
      else if (seg == SEG_TC)       pending <= 1'b0;
      clr <= pending && (seg == SEG_TC);
    end
  end

  always_comb begin
    tout       = (ones >= CNT_W'(MAJ_THRESH));
    tout_valid = clr;
    match_cnt  = ones;
  end

  // The PISO must be emptied before it is reloaded.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 load |-> !piso_active || seg == SEG_TC)
    else $error("iic_cmp_majority: load while the previous substring is still shifting");

endmodule
