// iic_complementer: controlled complementer of the receiver.
//
// Sixteen 2:1 multiplexers, each fed with one cover bit and its inverse and
// selected by the received modulated bit: f = d when tout is 1 (the coded
// message was in phase with the cover substring) and f = ~d when tout is 0.
// This follows the published circuit. Purely combinational.
module iic_complementer #(
  parameter int unsigned SUB_LEN = iic_pkg::SUB_LEN
) (
  input  logic [SUB_LEN-1:0] d,
  input  logic               tout,
  output logic [SUB_LEN-1:0] f
);

  always_comb begin
    for (int i = 0; i < SUB_LEN; i++) f[i] = tout ? d[i] : ~d[i];
  end

endmodule
