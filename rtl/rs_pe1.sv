// PE[1] of the register-sharing systolic multiplier.
//
// The partial products of PE[0] become the running sums of the two branches.
// After cut-set retiming the AND of a stage and the XOR that adds its result
// sit in consecutive stages, and the first sum has nothing to be added to, so
// PE[1] registers the incoming products as the sums without an XOR cell. Like a
// regular PE it forms the next pair of partial products, b_1 * A^(1) (upper) and
// b_(M/2+2) * alpha^(M/2+1) * A^(1) (lower, from the shared operand by wiring),
// and passes alpha * A^(1) on. Whether the published PE[1] spends an XOR cell
// on adding zero is not known; this version has none.
//
// Timing: all outputs registered, one clock after the inputs. Asynchronous
// active-low reset clears all registers (this design's choice).
module rs_pe1 #(
  parameter int unsigned M = gf_aop_pkg::PAPER_M
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [M:0] a_in,    // A^(1)
  input  logic [M:0] b_in,    // B
  input  logic [M:0] pu_in,   // upper product of PE[0]
  input  logic [M:0] pl_in,   // lower product of PE[0]
  output logic [M:0] a_out,   // A^(2)
  output logic [M:0] b_out,
  output logic [M:0] su_out,  // upper running sum
  output logic [M:0] sl_out,  // lower running sum
  output logic [M:0] pu_out,  // b_1 * A^(1)
  output logic [M:0] pl_out   // b_(M/2+2) * alpha^(M/2+1) * A^(1)
);

  localparam int unsigned H = M / 2;

  logic [M:0] a_shift, a_lower, pu, pl;

  bsc #(.M(M), .SHIFT(1))     u_bsc   (.a(a_in), .y(a_shift));
  bsc #(.M(M), .SHIFT(H + 1)) u_share (.a(a_in), .y(a_lower));
  and_cell #(.M(M)) u_and_u (.a(a_in),    .bit_b(b_in[1]),     .y(pu));
  and_cell #(.M(M)) u_and_l (.a(a_lower), .bit_b(b_in[H + 2]), .y(pl));

  delay_unit #(.WIDTH(M + 1)) u_ra (.clk(clk), .rst_n(rst_n), .d(a_shift), .q(a_out));
  delay_unit #(.WIDTH(M + 1)) u_rb (.clk(clk), .rst_n(rst_n), .d(b_in),    .q(b_out));
  delay_unit #(.WIDTH(M + 1)) u_rsu(.clk(clk), .rst_n(rst_n), .d(pu_in),   .q(su_out));
  delay_unit #(.WIDTH(M + 1)) u_rsl(.clk(clk), .rst_n(rst_n), .d(pl_in),   .q(sl_out));
  delay_unit #(.WIDTH(M + 1)) u_rpu(.clk(clk), .rst_n(rst_n), .d(pu),      .q(pu_out));
  delay_unit #(.WIDTH(M + 1)) u_rpl(.clk(clk), .rst_n(rst_n), .d(pl),      .q(pl_out));

endmodule
