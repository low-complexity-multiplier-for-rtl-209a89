// Testbench of a regular PE of the register-sharing multiplier: PE[3] of an
// M = 10 array, so the stage index K is not the default.
// Every clock it drives random inputs and, one clock later, compares each
// registered output with a value computed here from those inputs. Rotation by
// alpha^s is computed as a double-width shift folded back. Also checks that
// reset holds every output at zero.
module tb_rs_pe_regular;
  localparam int unsigned M = 10;
  localparam int unsigned K = 3;

  localparam int unsigned N = M + 1;
  localparam int unsigned H = M / 2;

  int checks = 0, failures = 0;
  logic clk;
  logic rst_n = 1'b0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  // Multiplication by alpha^s: a double-width shift folded back.
  function automatic logic [M:0] rot(input logic [M:0] x, input int s);
    logic [2*M+1:0] w = {{N{1'b0}}, x} << s;
    return w[M:0] | w[2*M+1:N];
  endfunction

  function automatic logic [M:0] rnd();
    logic [M:0] r;
    for (int i = 0; i <= M; i++) r[i] = 1'($urandom);
    return r;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [M:0] a_in = '0;
  logic [M:0] b_in = '0;
  logic [M:0] su_in = '0;
  logic [M:0] sl_in = '0;
  logic [M:0] pu_in = '0;
  logic [M:0] pl_in = '0;
  logic [M:0] a_out;
  logic [M:0] b_out;
  logic [M:0] su_out;
  logic [M:0] sl_out;
  logic [M:0] pu_out;
  logic [M:0] pl_out;
  logic [M:0] e_a_out;
  logic [M:0] e_b_out;
  logic [M:0] e_su_out;
  logic [M:0] e_sl_out;
  logic [M:0] e_pu_out;
  logic [M:0] e_pl_out;

  rs_pe_regular #(.M(M), .K(K)) dut (.clk(clk), .rst_n(rst_n), .a_in(a_in), .b_in(b_in), .su_in(su_in), .sl_in(sl_in), .pu_in(pu_in), .pl_in(pl_in), .a_out(a_out), .b_out(b_out), .su_out(su_out), .sl_out(sl_out), .pu_out(pu_out), .pl_out(pl_out));

  initial begin
    // Inputs change while reset holds every register at zero.
      a_in = rnd();
      b_in = rnd();
      su_in = rnd();
      sl_in = rnd();
      pu_in = rnd();
      pl_in = rnd();
    @(negedge clk);
    @(negedge clk);
    chk(a_out == '0 && b_out == '0 && su_out == '0 && sl_out == '0 && pu_out == '0 && pl_out == '0, "outputs not zero in reset");
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      a_in = rnd();
      b_in = rnd();
      su_in = rnd();
      sl_in = rnd();
      pu_in = rnd();
      pl_in = rnd();
      e_a_out = rot(a_in, 1);
      e_b_out = b_in;
      e_su_out = su_in ^ pu_in;
      e_sl_out = sl_in ^ pl_in;
      e_pu_out = b_in[K] ? a_in : '0;
      e_pl_out = b_in[K+H+1] ? rot(a_in, H + 1) : '0;
      @(negedge clk);
      chk(a_out == e_a_out, $sformatf("a_out=%b expected %b", a_out, e_a_out));
      chk(b_out == e_b_out, $sformatf("b_out=%b expected %b", b_out, e_b_out));
      chk(su_out == e_su_out, $sformatf("su_out=%b expected %b", su_out, e_su_out));
      chk(sl_out == e_sl_out, $sformatf("sl_out=%b expected %b", sl_out, e_sl_out));
      chk(pu_out == e_pu_out, $sformatf("pu_out=%b expected %b", pu_out, e_pu_out));
      chk(pl_out == e_pl_out, $sformatf("pl_out=%b expected %b", pl_out, e_pl_out));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
