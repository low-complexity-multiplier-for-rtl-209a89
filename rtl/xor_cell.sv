// XOR cell: (M+1) XOR gates working in parallel, bit-by-bit addition of two
// elements of GF(2^m) (addition in characteristic 2 has no carries). Used to
// accumulate partial products along a systolic branch. Combinational; it is the
// one gate on the critical path of every PE.
module xor_cell #(
  parameter int unsigned M = gf_aop_pkg::PAPER_M
) (
  input  logic [M:0] u,
  input  logic [M:0] v,
  output logic [M:0] y
);

  assign y = u ^ v;

endmodule
