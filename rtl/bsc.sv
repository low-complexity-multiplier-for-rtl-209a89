// Bit-shift cell (BSC): multiplies an element in the extended AOP basis by
// alpha^SHIFT.
//
// Since alpha^(M+1) = 1, multiplication by alpha moves coefficient a_i to
// position i+1 and a_M back to position 0: a cyclic left rotation of the
// (M+1)-bit vector (bit 0 = coefficient of alpha^0). The systolic PEs use it with
// SHIFT = 1, as in the published cell. The register-sharing multiplier also uses
// it with SHIFT = M/2+1 to derive the lower branch's operand alpha^(M/2+1)*A^(k)
// from the shared operand register; that is pure wiring, no gates.
// Purely combinational, no clock.
module bsc #(
  parameter int unsigned M     = gf_aop_pkg::PAPER_M,
  parameter int unsigned SHIFT = 1
) (
  input  logic [M:0] a,
  output logic [M:0] y
);

  localparam int unsigned N = M + 1;
  localparam int unsigned S = SHIFT % N;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      y[(i + S) % N] = a[i];
    end
  end

endmodule
