// End-to-end testbench of gf_aop_rs_multiplier at its default size (M = 6).
//
// Stimulus: the five operand pairs published for the m = 6 example (strings
// printed with the coefficient of alpha^0 first), all 2^14 operand pairs back
// to back, then a random stream with
// back-to-back pairs, idle cycles and one reset in mid-stream. Reference: a
// schoolbook polynomial product of degree 2M folded mod x^(M+1)+1 (exponent k
// goes to k mod (M+1)), computed here without any part of the design.
// Checks: c for every valid output, out_valid in every cycle, the latency
// M/2+3 and one new product per clock, and that the pipeline is empty after
// reset. Mechanisms counted (each must occur): back-to-back issue, idle
// cycle, products whose lower branch (terms M/2+1 .. M, built from the shared
// operand register) is nonzero, products where both branch sums are nonzero so
// the addition cell combines them, and a reset that flushes products in flight.
module tb_gf_aop_rs_multiplier;

  localparam int unsigned M       = gf_aop_pkg::PAPER_M;
  localparam int unsigned N       = M + 1;
  localparam int unsigned H       = M / 2;
  localparam int unsigned LATENCY = H + 3;
  localparam int unsigned NRAND   = 3000;

  logic         clk;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic [M:0]   a = '0, b = '0;
  logic         out_valid;
  logic [M:0]   c;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_exh = 0;
  int n_b2b = 0, n_idle = 0, n_lower = 0, n_both = 0, n_flush = 0, n_out = 0;

  // Issue history, indexed by cycle modulo 64.
  logic       hist_v [64];
  logic [M:0] hist_c [64];

  gf_aop_rs_multiplier dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .c(c)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  function automatic logic [M:0] ref_mul(input logic [M:0] x, input logic [M:0] y);
    logic [2*M:0] p = '0;
    logic [M:0]   r = '0;
    for (int i = 0; i <= M; i++)
      for (int j = 0; j <= M; j++)
        if (x[i] && y[j]) p[i+j] = ~p[i+j];
    for (int k = 0; k <= 2*M; k++)
      if (p[k]) r[k % N] = ~r[k % N];
    return r;
  endfunction

  // Partial sums of the two branches, for counting which mechanisms a pair uses.
  function automatic logic [M:0] ref_half(input logic [M:0] x, input logic [M:0] y,
                                          input bit upper);
    logic [M:0] yy = y;
    for (int i = 0; i <= M; i++)
      if (upper ? (i > H) : (i <= H)) yy[i] = 1'b0;
    return ref_mul(x, yy);
  endfunction

  // Published vectors print a_0 first.
  function automatic logic [M:0] pv(input string s);
    logic [M:0] r = '0;
    for (int i = 0; i <= M; i++) r[i] = (s[i] == "1");
    return r;
  endfunction

  task automatic fail(input string what);
    failures++;
    $display("FAIL cycle %0d: %s", cyc, what);
  endtask

  // Drive one cycle at the falling edge; check outputs there as well.
  task automatic step(input logic v, input logic [M:0] x, input logic [M:0] y);
    @(negedge clk);
    cyc++;
    // Outputs now reflect the pair issued LATENCY cycles ago.
    checks++;
    if (out_valid !== hist_v[(cyc - LATENCY) % 64])
      fail($sformatf("out_valid=%0b expected %0b", out_valid, hist_v[(cyc - LATENCY) % 64]));
    if (hist_v[(cyc - LATENCY) % 64]) begin
      checks++;
      n_out++;
      if (c !== hist_c[(cyc - LATENCY) % 64])
        fail($sformatf("c=%b expected %b", c, hist_c[(cyc - LATENCY) % 64]));
    end
    if (v && hist_v[(cyc - 1) % 64]) n_b2b++;
    if (!v) n_idle++;
    if (v) begin
      if (ref_half(x, y, 1'b0) != '0) n_lower++;
      if (ref_half(x, y, 1'b0) != '0 && ref_half(x, y, 1'b1) != '0) n_both++;
    end
    in_valid = v; a = x; b = y;
    hist_v[cyc % 64] = v;
    hist_c[cyc % 64] = ref_mul(x, y);
  endtask

  string pa [5] = '{"1110101", "0101010", "1110000", "1100110", "1100001"};
  string pb [5] = '{"1000010", "1010101", "1110010", "1000010", "0111101"};
  string pc [5] = '{"0100010", "1100110", "0010111", "1111101", "0011001"};

  initial begin
    for (int i = 0; i < 64; i++) begin hist_v[i] = 1'b0; hist_c[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Reference model against the published products.
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (ref_mul(pv(pa[i]), pv(pb[i])) != pv(pc[i])) fail("reference model vs published vector");
    end
    // Published pairs, back to back.
    for (int i = 0; i < 5; i++) step(1'b1, pv(pa[i]), pv(pb[i]));
    repeat (LATENCY + 1) step(1'b0, '0, '0);

    // Latency of a single isolated pair, counted in clocks.
    begin
      int t0, t1;
      step(1'b1, pv(pa[0]), pv(pb[0]));
      t0 = cyc;
      t1 = -1;
      for (int k = 0; k < 4 * LATENCY && t1 < 0; k++) begin
        step(1'b0, '0, '0);
        if (out_valid) t1 = cyc;
      end
      checks++;
      if (t1 - t0 != LATENCY) fail($sformatf("latency %0d expected %0d", t1 - t0, LATENCY));
      checks++;
      if (c !== pv(pc[0])) fail("isolated published pair");
    end

    // Every operand pair of the default size, back to back.
    for (int i = 0; i < (1 << (2 * N)); i++) begin
      step(1'b1, N'(i), N'(i >> N));
      n_exh++;
    end
    repeat (LATENCY + 1) step(1'b0, '0, '0);

    // Random stream: mostly back to back, some idle cycles.
    for (int i = 0; i < NRAND; i++) begin
      logic v;
      v = ($urandom_range(0, 9) != 0);
      step(v, N'($urandom), N'($urandom));
      if (i == NRAND / 2) begin
        // Reset with products in flight: they must never appear.
        @(negedge clk);
        rst_n = 1'b0;
        for (int k = 0; k < 64; k++) hist_v[k] = 1'b0;
        n_flush++;
        @(negedge clk);
        checks++;
        if (out_valid !== 1'b0 || c !== '0) fail("pipeline not empty during reset");
        rst_n = 1'b1;
        in_valid = 1'b0;
      end
    end
    repeat (LATENCY + 1) step(1'b0, '0, '0);

    $display("exhaustive pairs=%0d", n_exh);
    $display("mechanisms: back_to_back=%0d idle=%0d lower_branch=%0d both_branches=%0d reset_flush=%0d outputs=%0d",
             n_b2b, n_idle, n_lower, n_both, n_flush, n_out);
    if (n_b2b == 0)   fail("no back-to-back issue");
    if (n_idle == 0)  fail("no idle cycle");
    if (n_lower == 0) fail("lower branch never used");
    if (n_both == 0)  fail("addition cell never combined two nonzero sums");
    if (n_flush == 0) fail("no reset in flight");
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
