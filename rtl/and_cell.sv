// AND cell: (M+1) AND gates working in parallel. Multiplies the operand vector
// a by one coefficient bit b_i of the other operand, which forms the partial
// product b_i * A^(i) of the bit-serial-in-B product. Combinational.
module and_cell #(
  parameter int unsigned M = gf_aop_pkg::PAPER_M
) (
  input  logic [M:0] a,
  input  logic       bit_b,
  output logic [M:0] y
);

  assign y = a & {(M + 1){bit_b}};

endmodule
