// Testbench of the XOR cell, exhaustive for M = 6 over all pairs of 7-bit
// operands. Reference: bit i of the sum is 1 when exactly one of u_i, v_i is 1
// (addition over GF(2)).
module tb_xor_cell;

  int checks = 0, failures = 0;

  logic [6:0] u, v, y;

  xor_cell #(.M(6)) dut (.u(u), .v(v), .y(y));

  initial begin
    for (int i = 0; i < 128; i++) begin
      for (int j = 0; j < 128; j++) begin
        logic [6:0] e;
        u = 7'(i);
        v = 7'(j);
        #1;
        for (int k = 0; k < 7; k++) e[k] = (u[k] != v[k]);
        checks++;
        if (y !== e) begin
          failures++;
          $display("FAIL u=%b v=%b y=%b", u, v, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
