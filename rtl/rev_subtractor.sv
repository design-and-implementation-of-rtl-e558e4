// rev_subtractor: W-bit two's-complement subtractor, d = a - b - ~bin_n.
//
// B is inverted with a row of reversible gates (Q output with A = 0 and
// C = 0 gives NOT B) and added to A in a rev_adder with carry in bin_n
// (1 for a plain subtraction). cout = 1 means no borrow (a >= b when
// bin_n = 1). The document shows a subtractor block with inputs A, B and C
// but not its insides; this structure is this design's own. Combinational.
module rev_subtractor #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         bin_n,
  output logic [W-1:0] d,
  output logic         cout
);
  logic [W-1:0] b_n, unused_p, unused_r;

  rev_gate #(.W(W)) u_inv (.a('0), .b(b), .c('0), .p(unused_p), .q(b_n), .r(unused_r));
  rev_adder #(.W(W)) u_add (.a(a), .b(b_n), .cin(bin_n), .s(d), .cout(cout));
endmodule
