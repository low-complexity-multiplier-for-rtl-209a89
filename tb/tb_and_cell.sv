// Testbench of the AND cell, exhaustive for M = 6: every 7-bit operand with the
// coefficient bit 0 and 1. Reference: the operand itself when the bit is 1,
// zero otherwise, per bit.
module tb_and_cell;

  int checks = 0, failures = 0;

  logic [6:0] a, y;
  logic       bit_b;

  and_cell #(.M(6)) dut (.a(a), .bit_b(bit_b), .y(y));

  initial begin
    for (int v = 0; v < 256; v++) begin
      a = 7'(v);
      bit_b = v[7];
      #1;
      for (int i = 0; i < 7; i++) begin
        checks++;
        if (y[i] !== (bit_b ? a[i] : 1'b0)) begin
          failures++;
          $display("FAIL a=%b b=%b y=%b", a, bit_b, y);
        end
      end
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
