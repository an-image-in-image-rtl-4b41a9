// iic_redundancy_remover: majority decoder of the receiver.
//
// The recovered 16-symbol string f is split into a 9-symbol part (f[15:7],
// copies of message bit 3), a 5-symbol part (f[6:2], copies of bit 2) and the
// two single bits f[1] and f[0]. On load the two parts go into shift
// registers; in the next 9 cycles their top bits drive the clock enables of
// two 4-bit counters. Bit 3 is decoded as 1 when at least 5 of its 9 copies
// are 1, bit 2 when at least 3 of its 5 copies are 1; bits 1 and 0 are taken
// as received. Counting with clock-enabled counters and the 5-of-9 threshold
// follow the published design; the 3-of-5 threshold is the same majority
// rule, and the shift registers are this implementation's way of feeding the
// counters.
//
// Timing: load in cycle L gives m and a one-cycle m_valid in cycle L+10; m
// then holds until the next decision. Loads must be at least 10 cycles apart
// (they come every 16). Reset is synchronous, active low.
module iic_redundancy_remover
  import iic_pkg::*;
#(
  parameter int unsigned CW = iic_pkg::CNT_W
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  word_t f,
  output pix_t  m,
  output logic  m_valid
);

  logic [REP3-1:0]  sh3;
  logic [REP2-1:0]  sh2;
  logic [1:0]       lo;
  logic [CW-1:0] c3, c2;
  logic [CW-1:0] c3_nxt, c2_nxt;
  logic [CW-1:0] step;
  logic             busy;

  always_comb begin
    c3_nxt = c3 + CW'(sh3[REP3-1]);
    c2_nxt = c2 + CW'(sh2[REP2-1]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh3     <= '0;
      sh2     <= '0;
      lo      <= '0;
      c3      <= '0;
      c2      <= '0;
      step    <= '0;
      busy    <= 1'b0;
      m       <= '0;
      m_valid <= 1'b0;
    end else begin
      m_valid <= 1'b0;
      if (load) begin
        sh3  <= f[SUB_LEN-1 -: REP3];
        sh2  <= f[SUB_LEN-1-REP3 -: REP2];
        lo   <= f[1:0];
        c3   <= '0;
        c2   <= '0;
        step <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        c3   <= c3_nxt;
        c2   <= c2_nxt;
        sh3  <= sh3 << 1;
        sh2  <= sh2 << 1;
        step <= step + 1'b1;
        if (step == CW'(REP3 - 1)) begin
          busy    <= 1'b0;
          m       <= {c3_nxt >= CW'(THR3), c2_nxt >= CW'(THR2), lo};
          m_valid <= 1'b1;
        end
      end
    end
  end

  a_load_spacing: assert property (@(posedge clk) disable iff (!rst_n) load |-> !busy)
    else $error("iic_redundancy_remover: load while a decision is in progress");

endmodule
