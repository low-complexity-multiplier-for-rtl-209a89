// Shared constants of the all-one-polynomial (AOP) systolic multiplier.
//
// Field elements of GF(2^m) built on the AOP P(x) = 1 + x + ... + x^m are
// carried in the (m+1)-bit extended basis {1, alpha, ..., alpha^m}: bit i of a
// vector is the coefficient of alpha^i. Because (x+1)P(x) = x^(m+1)+1, alpha^(m+1)
// is 1 in this basis, so multiplying by alpha is a cyclic shift of the vector.
//
// PAPER_M is the field size of the published m = 6 example; every module takes M
// as a parameter with this default. rs_latency() gives the number of register
// stages from the operand inputs to the product output of the register-sharing
// structure: PE[0] .. PE[m/2+1] (m/2+2 stages) plus the registered addition cell.
package gf_aop_pkg;

  localparam int unsigned PAPER_M = 6;

  function automatic int unsigned rs_latency(input int unsigned m);
    return m / 2 + 3;
  endfunction

endpackage
