// Regular PE[K] (2 <= K <= M/2-1) of the register-sharing systolic multiplier.
//
// It holds one bit-shift cell, a pair of XOR cells and a pair of AND cells
// (2(M+1) XOR and 2(M+1) AND gates). In one clock it
//   - adds the partial products of PE[K-1] into the upper and lower sums,
//   - forms the upper product b_K * A^(K) and the lower product
//     b_(K+M/2+1) * alpha^(M/2+1) * A^(K); the lower operand is the shared
//     operand register rotated by wiring,
//   - passes A^(K+1) = alpha * A^(K) on.
// The AND cells and the XOR cells work in parallel on different data (cut-set
// retiming), so the longest path in the stage is one XOR gate.
//
// Timing: all outputs registered, one clock after the inputs. Asynchronous
// active-low reset clears all registers (this design's choice).
module rs_pe_regular #(
  parameter int unsigned M = gf_aop_pkg::PAPER_M,
  parameter int unsigned K = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [M:0] a_in,    // A^(K)
  input  logic [M:0] b_in,    // B
  input  logic [M:0] su_in,   // upper sum of products 0 .. K-2
  input  logic [M:0] sl_in,   // lower sum
  input  logic [M:0] pu_in,   // upper product of PE[K-1]
  input  logic [M:0] pl_in,   // lower product of PE[K-1]
  output logic [M:0] a_out,   // A^(K+1)
  output logic [M:0] b_out,
  output logic [M:0] su_out,  // su_in + pu_in
  output logic [M:0] sl_out,  // sl_in + pl_in
  output logic [M:0] pu_out,  // b_K * A^(K)
  output logic [M:0] pl_out   // b_(K+M/2+1) * alpha^(M/2+1) * A^(K)
);

  localparam int unsigned H = M / 2;

  logic [M:0] a_shift, a_lower, pu, pl, su, sl;

  bsc #(.M(M), .SHIFT(1))     u_bsc   (.a(a_in), .y(a_shift));
  bsc #(.M(M), .SHIFT(H + 1)) u_share (.a(a_in), .y(a_lower));
  and_cell #(.M(M)) u_and_u (.a(a_in),    .bit_b(b_in[K]),         .y(pu));
  and_cell #(.M(M)) u_and_l (.a(a_lower), .bit_b(b_in[K + H + 1]), .y(pl));
  xor_cell #(.M(M)) u_xor_u (.u(su_in), .v(pu_in), .y(su));
  xor_cell #(.M(M)) u_xor_l (.u(sl_in), .v(pl_in), .y(sl));

  delay_unit #(.WIDTH(M + 1)) u_ra (.clk(clk), .rst_n(rst_n), .d(a_shift), .q(a_out));
  delay_unit #(.WIDTH(M + 1)) u_rb (.clk(clk), .rst_n(rst_n), .d(b_in),    .q(b_out));
  delay_unit #(.WIDTH(M + 1)) u_rsu(.clk(clk), .rst_n(rst_n), .d(su),      .q(su_out));
  delay_unit #(.WIDTH(M + 1)) u_rsl(.clk(clk), .rst_n(rst_n), .d(sl),      .q(sl_out));
  delay_unit #(.WIDTH(M + 1)) u_rpu(.clk(clk), .rst_n(rst_n), .d(pu),      .q(pu_out));
  delay_unit #(.WIDTH(M + 1)) u_rpl(.clk(clk), .rst_n(rst_n), .d(pl),      .q(pl_out));

endmodule
