// rev_adder: W-bit ripple-carry adder built from reversible-gate full adders.
//
// s = a + b + cin, cout is the carry out of the top bit. The document calls
// for a reversible-logic adder without giving its structure; a ripple chain
// of rev_full_adder cells is the simplest one and is this design's choice.
// Combinational; delay grows linearly with W.
module rev_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    rev_full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end
  assign cout = c[W];
endmodule
