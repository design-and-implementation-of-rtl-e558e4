// rev_divider: W-bit unsigned restoring divider, q = a / b, r = a % b.
//
// W identical stages, one per quotient bit from the top down. Stage j
// shifts the partial remainder left by one, brings in dividend bit
// W-1-j, and tries to subtract b with a (W+1)-bit reversible subtractor.
// When no borrow occurs the difference becomes the new remainder and the
// quotient bit is 1; otherwise the shifted remainder is kept and the bit is
// 0. Dividing by zero therefore gives q = all ones and r = a.
// The document lists division among the arithmetic unit's operations but
// gives no circuit; the restoring array is this design's choice.
// Combinational; the path runs through W subtractors.
module rev_divider #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] q,
  output logic [W-1:0] r
);
  for (genvar j = 0; j < W; j++) begin : g_st
    logic [W-1:0] rem_in, rem_o;
    logic [W:0]   shifted, diff;
    logic         no_borrow;

    if (j == 0) begin : g_first
      assign rem_in = '0;
    end else begin : g_next
      assign rem_in = g_st[j-1].rem_o;
    end

    assign shifted = {rem_in, a[W-1-j]};
    rev_subtractor #(.W(W+1)) u_sub (.a(shifted), .b({1'b0, b}), .bin_n(1'b1),
                                     .d(diff), .cout(no_borrow));
    assign rem_o      = no_borrow ? diff[W-1:0] : shifted[W-1:0];
    assign q[W-1-j]   = no_borrow;
  end

  assign r = g_st[W-1].rem_o;
endmodule
