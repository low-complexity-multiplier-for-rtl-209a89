// Parameter sweep of gf_aop_rs_multiplier: the same random product stream on
// instances with M = 4, 8, 10, 12 and 36. M = 4 is the smallest the structure
// allows (no regular PE), M = 8 has exactly one regular PE, and 4, 10, 12, 36
// are sizes whose all-one polynomial is irreducible, so the products are field
// products. Each instance is checked against a schoolbook product folded mod
// x^(M+1)+1 and for its latency M/2+3, with a new pair every clock.
module tb_gf_aop_rs_sweep;

  logic clk;
  logic rst_n = 1'b0;
  int   checks [5];
  int   failures [5];
  bit   done [5];

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  for (genvar g = 0; g < 5; g++) begin : g_inst
    localparam int unsigned M = (g == 0) ? 4 : (g == 1) ? 8 : (g == 2) ? 10 : (g == 3) ? 12 : 36;
    localparam int unsigned N = M + 1;
    localparam int unsigned L = M / 2 + 3;

    logic       in_valid = 1'b0;
    logic [M:0] a = '0, b = '0;
    logic       out_valid;
    logic [M:0] c;
    logic [M:0] exp_c [$];
    int         issue_cyc [$];
    int         cyc = 0;

    gf_aop_rs_multiplier #(.M(M)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
      .out_valid(out_valid), .c(c)
    );

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

    function automatic logic [M:0] rnd();
      logic [M:0] r;
      for (int i = 0; i <= M; i++) r[i] = 1'($urandom);
      return r;
    endfunction

    initial begin
      checks[g] = 0; failures[g] = 0; done[g] = 0;
      @(posedge rst_n);
      for (int i = 0; i < 600 + L + 2; i++) begin
        @(negedge clk);
        cyc++;
        if (out_valid) begin
          checks[g] += 2;
          if (exp_c.size() == 0) begin
            failures[g]++;
            $display("FAIL M=%0d: unexpected output", M);
          end else begin
            if (c !== exp_c[0]) begin
              failures[g]++;
              $display("FAIL M=%0d: c=%h expected %h", M, c, exp_c[0]);
            end
            if (cyc - issue_cyc[0] != L) begin
              failures[g]++;
              $display("FAIL M=%0d: latency %0d", M, cyc - issue_cyc[0]);
            end
            void'(exp_c.pop_front());
            void'(issue_cyc.pop_front());
          end
        end
        if (i < 600) begin
          in_valid = 1'b1;
          a = rnd();
          b = rnd();
          exp_c.push_back(ref_mul(a, b));
          issue_cyc.push_back(cyc);
        end else begin
          in_valid = 1'b0;
        end
      end
      checks[g]++;
      if (exp_c.size() != 0) begin
        failures[g]++;
        $display("FAIL M=%0d: %0d products missing", M, exp_c.size());
      end
      done[g] = 1;
    end
  end

  initial begin
    int tc, tf;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    tc = 0; tf = 0;
    for (int g = 0; g < 5; g++) begin tc += checks[g]; tf += failures[g]; end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    int tc, tf;
    repeat (5000) @(posedge clk);
    tc = 0; tf = 1;
    for (int g = 0; g < 5; g++) begin tc += checks[g]; tf += failures[g]; end
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

endmodule
