// iic_mux_array: array of 2:1 multiplexers between the two SIPO words.
//
// Passes d1 (SIPO-1) to d when sel_d1 is 1 and d2 (SIPO-2) otherwise, one
// multiplexer per bit, as in the published block diagrams. Purely
// combinational; the select polarity is this implementation's choice.
module iic_mux_array #(
  parameter int unsigned SUB_LEN = iic_pkg::SUB_LEN
) (
  input  logic [SUB_LEN-1:0] d1,
  input  logic [SUB_LEN-1:0] d2,
  input  logic               sel_d1,
  output logic [SUB_LEN-1:0] d
);

  always_comb begin
    for (int i = 0; i < SUB_LEN; i++) d[i] = sel_d1 ? d1[i] : d2[i];
  end

endmodule
