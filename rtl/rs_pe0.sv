// PE[0] of the register-sharing systolic multiplier: the first stage, which
// starts both branches.
//
// Both branches read the same operand A = A^(0). The upper branch forms the
// partial product b_0 * A; the lower branch forms b_(M/2+1) * alpha^(M/2+1) * A,
// where the rotation by M/2+1 is wiring on the shared operand (no second operand
// register). The stage holds a pair of AND cells and one bit-shift cell, which
// passes alpha * A on to PE[1]. No XOR cell: there is nothing to add yet.
//
// Timing: every output is registered and valid one clock after a_in/b_in. B is
// passed on whole (b_out); bits no later stage reads are left for synthesis to
// prune. Reset (asynchronous, active low, clears all registers) is this
// design's choice.
module rs_pe0 #(
  parameter int unsigned M = gf_aop_pkg::PAPER_M
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [M:0] a_in,    // A^(0) = A
  input  logic [M:0] b_in,    // B
  output logic [M:0] a_out,   // alpha * A
  output logic [M:0] b_out,   // B, one clock later
  output logic [M:0] pu_out,  // upper partial product b_0 * A
  output logic [M:0] pl_out   // lower partial product b_(M/2+1) * alpha^(M/2+1) * A
);

  localparam int unsigned H = M / 2;

  logic [M:0] a_shift, a_lower, pu, pl;

  bsc #(.M(M), .SHIFT(1))     u_bsc   (.a(a_in), .y(a_shift));
  bsc #(.M(M), .SHIFT(H + 1)) u_share (.a(a_in), .y(a_lower));
  and_cell #(.M(M)) u_and_u (.a(a_in),    .bit_b(b_in[0]),     .y(pu));
  and_cell #(.M(M)) u_and_l (.a(a_lower), .bit_b(b_in[H + 1]), .y(pl));

  delay_unit #(.WIDTH(M + 1)) u_ra (.clk(clk), .rst_n(rst_n), .d(a_shift), .q(a_out));
  delay_unit #(.WIDTH(M + 1)) u_rb (.clk(clk), .rst_n(rst_n), .d(b_in),    .q(b_out));
  delay_unit #(.WIDTH(M + 1)) u_rpu(.clk(clk), .rst_n(rst_n), .d(pu),      .q(pu_out));
  delay_unit #(.WIDTH(M + 1)) u_rpl(.clk(clk), .rst_n(rst_n), .d(pl),      .q(pl_out));

endmodule
