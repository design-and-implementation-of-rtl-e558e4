// vedic_mul2: 2 x 2 bit Vedic (vertical and crosswise) multiplier, q = x * y.
//
//   q[0]        = x0.y0
//   {c1, q[1]}  = x0.y1 + x1.y0        (first adder)
//   {q[3],q[2]} = x1.y1 + c1           (second adder)
//
// The bit products and the adder arrangement follow the document's 2-bit
// multiplier figure. The figure prints no gate types: here the products are
// the R output of the reversible gate with C = 0 (A.B) and each adder is a
// reversible-gate full adder with its carry in tied to 0. Combinational.
module vedic_mul2 (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic [3:0] q
);
  logic [3:0] pa, pb, pp;
  logic [3:0] unused_p, unused_q;
  logic       c1;

  // pp[0]=x0y0, pp[1]=x0y1, pp[2]=x1y0, pp[3]=x1y1
  assign pa = {x[1], x[1], x[0], x[0]};
  assign pb = {y[1], y[0], y[1], y[0]};
  rev_gate #(.W(4)) u_pp (.a(pa), .b(pb), .c(4'b0000), .p(unused_p), .q(unused_q), .r(pp));

  assign q[0] = pp[0];
  rev_full_adder u_add1 (.a(pp[1]), .b(pp[2]), .cin(1'b0), .s(q[1]), .cout(c1));
  rev_full_adder u_add2 (.a(pp[3]), .b(c1),    .cin(1'b0), .s(q[2]), .cout(q[3]));
endmodule
