// PE[M/2+1], the last stage of the register-sharing systolic multiplier.
//
// The upper branch has one partial product more than the lower one, so this
// stage has one XOR cell that adds the last upper product b_(M/2) * A^(M/2) to
// the upper sum, and a delay cell that holds the finished lower sum for the same
// clock so both sums reach the addition cell together.
//
// Timing: both outputs registered, one clock after the inputs. Asynchronous
// active-low reset clears the registers (this design's choice).
module rs_pe_last #(
  parameter int unsigned M = gf_aop_pkg::PAPER_M
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [M:0] su_in,
  input  logic [M:0] sl_in,
  input  logic [M:0] pu_in,
  output logic [M:0] su_out,  // complete upper-branch sum
  output logic [M:0] sl_out   // lower-branch sum, delayed one clock
);

  logic [M:0] su;

  xor_cell #(.M(M)) u_xor_u (.u(su_in), .v(pu_in), .y(su));

  delay_unit #(.WIDTH(M + 1)) u_rsu  (.clk(clk), .rst_n(rst_n), .d(su),    .q(su_out));
  delay_unit #(.WIDTH(M + 1)) u_delay(.clk(clk), .rst_n(rst_n), .d(sl_in), .q(sl_out));

endmodule
