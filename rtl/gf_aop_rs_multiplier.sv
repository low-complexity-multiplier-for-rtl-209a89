// Low-latency register-sharing systolic multiplier over GF(2^m) built on the
// all-one polynomial P(x) = 1 + x + ... + x^m.
//
// Operands and product are in the (m+1)-bit extended basis {1, alpha, ...,
// alpha^m}, bit i = coefficient of alpha^i. In that basis alpha^(m+1) = 1, so
//     C = A*B = sum_{i=0..m} b_i * A^(i),   A^(i) = alpha^i * A (a cyclic shift),
// and the result is A*B mod x^(m+1)+1, which is congruent to A*B mod P(x).
// (Reducing it to m bits, c_j + c_m for j < m, is left to the user.)
//
// The sum is split in two halves, products 0..M/2 (upper branch, M/2+1 terms)
// and M/2+1..M (lower branch, M/2 terms). At stage k the upper branch needs
// A^(k) and the lower one A^(k+M/2+1) = alpha^(M/2+1) * A^(k), a fixed rotation of
// the same vector. So both branches share one operand register chain, and the
// array has M/2+2 PEs instead of two full chains:
//     PE[0]          pair of AND cells + BSC             (products 0 and M/2+1)
//     PE[1]          pair of AND cells + BSC, sums start (products 1 and M/2+2)
//     PE[2..M/2-1]   regular: 2 AND cells, 2 XOR cells, BSC
//     PE[M/2]        1 AND cell, 2 XOR cells             (last product, M/2)
//     PE[M/2+1]      1 XOR cell + delay cell on the lower sum
//     AC             XOR of the two branch sums, registered
// Every stage is registered and its longest path is one XOR gate.
//
// Interface and timing: a, b are sampled on every rising clock; the product of
// the pair sampled at edge t is on c after edge t + LATENCY - 1, LATENCY =
// M/2+3 (6 for M = 6). A new pair can enter every clock. in_valid is not used
// by the datapath; it travels down a LATENCY-deep valid pipe to out_valid (this
// design's addition, as is the asynchronous active-low reset that clears every
// register). M must be even and at least 4. The product is a field product when
// P(x) is irreducible (m = 4, 10, 12, 18, 28, 36, ...); for other even m, such as
// the default 6, it is still the exact product in the ring mod x^(m+1)+1.
module gf_aop_rs_multiplier #(
  parameter int unsigned M = gf_aop_pkg::PAPER_M
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [M:0] a,
  input  logic [M:0] b,
  output logic       out_valid,
  output logic [M:0] c
);

  localparam int unsigned H       = M / 2;
  localparam int unsigned LATENCY = gf_aop_pkg::rs_latency(M);

  if (M < 4 || (M % 2) != 0) begin : g_bad_m
    $error("gf_aop_rs_multiplier: M must be even and at least 4");
  end

  // Outputs of stage k, k = 0 .. H+1.
  logic [M:0] a_s  [H+1];
  logic [M:0] b_s  [H+1];
  logic [M:0] pu_s [H+1];
  logic [M:0] pl_s [H+1];
  logic [M:0] su_s [H+2];
  logic [M:0] sl_s [H+2];

  rs_pe0 #(.M(M)) u_pe0 (
    .clk(clk), .rst_n(rst_n), .a_in(a), .b_in(b),
    .a_out(a_s[0]), .b_out(b_s[0]), .pu_out(pu_s[0]), .pl_out(pl_s[0])
  );

  rs_pe1 #(.M(M)) u_pe1 (
    .clk(clk), .rst_n(rst_n), .a_in(a_s[0]), .b_in(b_s[0]),
    .pu_in(pu_s[0]), .pl_in(pl_s[0]),
    .a_out(a_s[1]), .b_out(b_s[1]), .su_out(su_s[1]), .sl_out(sl_s[1]),
    .pu_out(pu_s[1]), .pl_out(pl_s[1])
  );

  for (genvar k = 2; k < H; k++) begin : g_regular
    rs_pe_regular #(.M(M), .K(k)) u_pe (
      .clk(clk), .rst_n(rst_n), .a_in(a_s[k-1]), .b_in(b_s[k-1]),
      .su_in(su_s[k-1]), .sl_in(sl_s[k-1]), .pu_in(pu_s[k-1]), .pl_in(pl_s[k-1]),
      .a_out(a_s[k]), .b_out(b_s[k]), .su_out(su_s[k]), .sl_out(sl_s[k]),
      .pu_out(pu_s[k]), .pl_out(pl_s[k])
    );
  end

  rs_pe_half #(.M(M)) u_pe_half (
    .clk(clk), .rst_n(rst_n), .a_in(a_s[H-1]), .b_in(b_s[H-1]),
    .su_in(su_s[H-1]), .sl_in(sl_s[H-1]), .pu_in(pu_s[H-1]), .pl_in(pl_s[H-1]),
    .su_out(su_s[H]), .sl_out(sl_s[H]), .pu_out(pu_s[H])
  );

  rs_pe_last #(.M(M)) u_pe_last (
    .clk(clk), .rst_n(rst_n), .su_in(su_s[H]), .sl_in(sl_s[H]), .pu_in(pu_s[H]),
    .su_out(su_s[H+1]), .sl_out(sl_s[H+1])
  );

  ac_unit #(.M(M)) u_ac (
    .clk(clk), .rst_n(rst_n), .u(su_s[H+1]), .v(sl_s[H+1]), .w(c)
  );

  // Stage H's operand outputs, stage 0's sums and the unused su/sl of index 0
  // carry nothing: PE[M/2] ends the operand chain, PE[0] starts no sum.
  assign a_s[H]  = '0;
  assign b_s[H]  = '0;
  assign pl_s[H] = '0;
  assign su_s[0] = '0;
  assign sl_s[0] = '0;

  // Valid pipe, one flip-flop per datapath stage.
  logic [LATENCY-1:0] valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else        valid_q <= {valid_q[LATENCY-2:0], in_valid};
  end

  assign out_valid = valid_q[LATENCY-1];

endmodule
