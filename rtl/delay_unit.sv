// Delay unit: a bank of WIDTH D flip-flops. q follows d one clock later. Every
// register of the systolic array (the operand, the B bits, partial products and
// partial sums between PEs, and the lower branch's delay cell) is one of these.
//
// Reset is this design's choice: an asynchronous active-low rst_n clears q to
// zero, so an idle array holds zero products. WIDTH defaults to M+1 = 7, the
// operand width of the m = 6 design.
module delay_unit #(
  parameter int unsigned WIDTH = gf_aop_pkg::PAPER_M + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
