// Testbench of the addition cell: w must be u XOR v of the previous clock.
// M = 6 with random sums, and M = 4 with the published 5-bit example
// 10011 + 01100 = 11111. Also checks that reset clears w.
module tb_ac_unit;

  int checks = 0, failures = 0;

  logic       clk;
  logic       rst_n = 1'b0;
  logic [6:0] u = '0, v = '0, w;
  logic [4:0] u4 = '0, v4 = '0, w4;

  ac_unit #(.M(6)) dut  (.clk(clk), .rst_n(rst_n), .u(u),  .v(v),  .w(w));
  ac_unit #(.M(4)) dut4 (.clk(clk), .rst_n(rst_n), .u(u4), .v(v4), .w(w4));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    u = 7'h7f; v = 7'h01;
    @(negedge clk);
    @(negedge clk);
    chk(w == '0 && w4 == '0, "w not zero in reset");
    rst_n = 1'b1;
    u4 = 5'b10011; v4 = 5'b01100;
    @(negedge clk);
    chk(w4 == 5'b11111, "published example");
    for (int i = 0; i < 1000; i++) begin
      logic [6:0] e;
      u = 7'($urandom);
      v = 7'($urandom);
      for (int k = 0; k < 7; k++) e[k] = u[k] ^ v[k];
      @(negedge clk);
      chk(w == e, $sformatf("w=%b expected %b", w, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
