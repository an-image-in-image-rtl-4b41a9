// iic_piso: parallel-in serial-out shift register.
//
// load copies d into the register; every other cycle the register shifts up
// by one with zero fill, so sout shows d[W-1], d[W-2], ... d[0] in the W
// cycles after the load. active is high in exactly those cycles. In the
// transmitter it feeds the comparator matches to the majority counter; in the
// receiver it serialises the decoded pixel. Shift direction and the active
// flag are this implementation's choices. Reset is synchronous, active low.
module iic_piso #(
  parameter int unsigned W = iic_pkg::SUB_LEN
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic         sout,
  output logic         active
);

  logic [W-1:0]         sr;
  logic [$clog2(W+1)-1:0] left;   // bits of the last load still to appear

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr   <= '0;
      left <= '0;
    end else if (load) begin
      sr   <= d;
      left <= ($clog2(W+1))'(W);
    end else begin
      sr   <= sr << 1;
      if (left != 0) left <= left - 1'b1;
    end
  end

  assign sout   = sr[W-1];
  assign active = (left != 0);

endmodule
