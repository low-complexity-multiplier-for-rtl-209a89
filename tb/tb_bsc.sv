// Testbench of the bit-shift cell. Exhaustive over all 7-bit inputs for M = 6
// with SHIFT = 1 (the PE shift) and SHIFT = 4 (the M/2+1 rotation that the lower
// branch reads), random for M = 10. Reference: multiplication by alpha^SHIFT
// written as a double-width shift folded back, (a << s | a >> (N-s)) mod 2^N,
// plus the published example 0000101 -> 1000010 (a_0 printed first).
module tb_bsc;

  int checks = 0, failures = 0;

  logic [6:0]  a6, y6_1, y6_4;
  logic [10:0] a10, y10_1;

  bsc #(.M(6),  .SHIFT(1)) u_s1  (.a(a6),  .y(y6_1));
  bsc #(.M(6),  .SHIFT(4)) u_s4  (.a(a6),  .y(y6_4));
  bsc #(.M(10), .SHIFT(1)) u_s10 (.a(a10), .y(y10_1));

  function automatic logic [6:0] rot7(input logic [6:0] x, input int s);
    logic [13:0] w = {7'b0, x} << s;
    return w[6:0] | w[13:7];
  endfunction

  function automatic logic [10:0] rot11(input logic [10:0] x, input int s);
    logic [21:0] w = {11'b0, x} << s;
    return w[10:0] | w[21:11];
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int v = 0; v < 128; v++) begin
      a6 = 7'(v);
      #1;
      chk(y6_1 == rot7(a6, 1), $sformatf("SHIFT=1 a=%b y=%b", a6, y6_1));
      chk(y6_4 == rot7(a6, 4), $sformatf("SHIFT=4 a=%b y=%b", a6, y6_4));
    end
    // Published example: a_4 = a_6 = 1 becomes a_5 = a_0 = 1.
    a6 = 7'b1010000;
    #1;
    chk(y6_1 == 7'b0100001, "published example");
    for (int i = 0; i < 500; i++) begin
      a10 = 11'($urandom);
      #1;
      chk(y10_1 == rot11(a10, 1), $sformatf("M=10 a=%b y=%b", a10, y10_1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
