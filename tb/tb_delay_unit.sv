// Testbench of the delay unit at its default width (7): q must equal the d of
// the previous clock, and an asserted reset must clear q at once, without a
// clock edge, and hold it at zero.
module tb_delay_unit;

  int checks = 0, failures = 0;

  logic       clk;
  logic       rst_n = 1'b0;
  logic [6:0] d = '0, q;

  delay_unit dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

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
    @(negedge clk);
    d = 7'h55;
    @(negedge clk);
    chk(q == '0, "q not held at zero in reset");
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      d = 7'($urandom);
      @(negedge clk);
      chk(q == d, $sformatf("q=%h expected %h", q, d));
      if (i == 250) begin
        #2 rst_n = 1'b0;
        #1 chk(q == '0, "asynchronous reset did not clear q");
        @(negedge clk);
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
