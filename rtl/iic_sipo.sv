// iic_sipo: serial-in parallel-out shift register with an output register.
//
// The shift register takes one symbol per clock from sin (the steered din1 or
// din2 of the control circuit) and shifts towards the top, so after 16 clocks
// the first symbol of the word sits in bit 15. A one-cycle pulse on en copies
// the shift register into the output register q, which then holds the word
// steady for the next 32 cycles while the other SIPO fills. The published
// design shows two SIPOs with an enable each; using the enable as the load of
// an output register, and the bit order, are this implementation's reading.
// Reset is synchronous, active low.
module iic_sipo #(
  parameter int unsigned SUB_LEN = iic_pkg::SUB_LEN
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sin,
  input  logic               en,
  output logic [SUB_LEN-1:0] q
);

  logic [SUB_LEN-1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr <= '0;
      q  <= '0;
    end else begin
      sr <= {sr[SUB_LEN-2:0], sin};
      if (en) q <= sr;
    end
  end

endmodule
