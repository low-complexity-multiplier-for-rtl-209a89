// Addition cell (AC): w <= u + v over GF(2), i.e. the bitwise XOR of the two
// systolic branch sums, giving the full product. It holds (M+1) XOR gates, as
// the published cost count says. The output register (one clock of latency) is
// this design's choice; it keeps the path from the last PE to the output at one
// XOR gate like every other stage. Asynchronous active-low reset clears w.
module ac_unit #(
  parameter int unsigned M = gf_aop_pkg::PAPER_M
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [M:0] u,
  input  logic [M:0] v,
  output logic [M:0] w
);

  logic [M:0] sum;

  xor_cell #(.M(M)) u_xor (.u(u), .v(v), .y(sum));
  delay_unit #(.WIDTH(M + 1)) u_reg (.clk(clk), .rst_n(rst_n), .d(sum), .q(w));

endmodule
