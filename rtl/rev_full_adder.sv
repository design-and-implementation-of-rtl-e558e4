// rev_full_adder: one-bit full adder made of four proposed reversible gates.
//
//   g0: R(1, a, b)   = a ^ b          (propagate p)
//   g1: R(1, p, cin) = p ^ cin        (sum)
//   g2: R(a, b, 0)   = a & b          (generate g)
//   g3: R(p, cin, g) = (p & cin) ^ g  (carry; the two terms never both hold)
//
// The document says the adders are built from reversible gates but does not
// give the circuit; this composition is this design's own. Combinational.
module rev_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p, g;
  logic unused_p0, unused_q0, unused_p1, unused_q1, unused_p2, unused_q2,
        unused_p3, unused_q3;

  rev_gate #(.W(1)) u_g0 (.a(1'b1), .b(a),   .c(b),    .p(unused_p0), .q(unused_q0), .r(p));
  rev_gate #(.W(1)) u_g1 (.a(1'b1), .b(p),   .c(cin),  .p(unused_p1), .q(unused_q1), .r(s));
  rev_gate #(.W(1)) u_g2 (.a(a),    .b(b),   .c(1'b0), .p(unused_p2), .q(unused_q2), .r(g));
  rev_gate #(.W(1)) u_g3 (.a(p),    .b(cin), .c(g),    .p(unused_p3), .q(unused_q3), .r(cout));
endmodule
