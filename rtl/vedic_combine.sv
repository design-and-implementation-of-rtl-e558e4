// vedic_combine: one divide-and-conquer step of the Vedic multiplier.
//
// Given the four H x H sub-products of two N-bit operands (H = N/2),
//   x0 = aL*bL, x1 = aL*bH, x2 = aH*bL, x3 = aH*bH,
// it forms the N x N product with three reversible adders, as in the
// document's 4-bit multiplier figure:
//   y[H-1:0]  = x0[H-1:0]
//   t1        = x1 + x0[N-1:H]
//   t2        = x2 + (x3 << H)
//   y[2N-1:H] = t1 + t2
// The document's bit equations list the column sums without carries; here
// the carries are kept so y is exact. t1 cannot overflow N bits, since
// x1 + x0[N-1:H] < 2**N; its carry is still wired in. Combinational.
module vedic_combine #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   x0,
  input  logic [N-1:0]   x1,
  input  logic [N-1:0]   x2,
  input  logic [N-1:0]   x3,
  output logic [2*N-1:0] y
);
  localparam int unsigned H = N / 2;

  logic [N-1:0]   s1;
  logic           c1;
  logic [N+H-1:0] t2, t3;
  logic           unused_c2, unused_c3;

  rev_adder #(.W(N)) u_add1 (.a(x1), .b({{H{1'b0}}, x0[N-1:H]}), .cin(1'b0),
                             .s(s1), .cout(c1));
  rev_adder #(.W(N+H)) u_add2 (.a({x3, {H{1'b0}}}), .b({{H{1'b0}}, x2}), .cin(1'b0),
                               .s(t2), .cout(unused_c2));
  rev_adder #(.W(N+H)) u_add3 (.a(t2), .b({{(H-1){1'b0}}, c1, s1}), .cin(1'b0),
                               .s(t3), .cout(unused_c3));

  assign y = {t3, x0[H-1:0]};
endmodule
