// PE[M/2] of the register-sharing systolic multiplier.
//
// The lower branch has only M/2 partial products (indices M/2+1 .. M), formed in
// PE[0] .. PE[M/2-1], so this stage forms just the last upper product
// b_(M/2) * A^(M/2) (one AND cell) and adds the incoming pair of products into
// the two sums (a pair of XOR cells). No operand leaves this stage, so it has no
// bit-shift cell and does not pass A or B on.
//
// Timing: all outputs registered, one clock after the inputs. Asynchronous
// active-low reset clears all registers (this design's choice).
module rs_pe_half #(
  parameter int unsigned M = gf_aop_pkg::PAPER_M
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [M:0] a_in,    // A^(M/2)
  input  logic [M:0] b_in,    // B
  input  logic [M:0] su_in,
  input  logic [M:0] sl_in,
  input  logic [M:0] pu_in,
  input  logic [M:0] pl_in,
  output logic [M:0] su_out,  // su_in + pu_in
  output logic [M:0] sl_out,  // sl_in + pl_in: the complete lower-branch sum
  output logic [M:0] pu_out   // b_(M/2) * A^(M/2)
);

  localparam int unsigned H = M / 2;

  logic [M:0] pu, su, sl;

  and_cell #(.M(M)) u_and_u (.a(a_in), .bit_b(b_in[H]), .y(pu));
  xor_cell #(.M(M)) u_xor_u (.u(su_in), .v(pu_in), .y(su));
  xor_cell #(.M(M)) u_xor_l (.u(sl_in), .v(pl_in), .y(sl));

  delay_unit #(.WIDTH(M + 1)) u_rsu(.clk(clk), .rst_n(rst_n), .d(su), .q(su_out));
  delay_unit #(.WIDTH(M + 1)) u_rsl(.clk(clk), .rst_n(rst_n), .d(sl), .q(sl_out));
  delay_unit #(.WIDTH(M + 1)) u_rpu(.clk(clk), .rst_n(rst_n), .d(pu), .q(pu_out));

endmodule
