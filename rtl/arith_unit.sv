// arith_unit: arithmetic unit of the reversible Vedic ALU.
//
// An adder, a subtractor and a Vedic multiplier all see the operands A and
// B (and the carry input C), as in the document's arithmetic-unit figure,
// and a divider, which the document's text lists among the arithmetic
// unit's operations; a multiplexer driven by SL[1:0] picks the result:
//   00  y = a + b + c                    cout = carry out
//   01  y = a - b - (1 - c)  (c=1: a-b)  cout = 1 when no borrow
//   10  y = low W bits of a * b          cout = 0
//   11  y = a / b (unsigned; all ones when b = 0)       cout = 0
// The multiplier is the full W x W Vedic multiplier; keeping only the low
// W bits of the product is this design's choice. Combinational.
module arith_unit #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]         a,
  input  logic [W-1:0]         b,
  input  logic                 c,
  input  risc_pkg::arith_sel_e sl,
  output logic [W-1:0]         y,
  output logic                 cout
);
  import risc_pkg::*;

  logic [W-1:0]   sum, diff;
  logic           sum_c, diff_c;
  logic [2*W-1:0] prod;
  logic [W-1:0]   quot, unused_rem;

  rev_adder      #(.W(W)) u_add (.a(a), .b(b), .cin(c), .s(sum), .cout(sum_c));
  rev_subtractor #(.W(W)) u_sub (.a(a), .b(b), .bin_n(c), .d(diff), .cout(diff_c));
  vedic_mul      #(.N(W)) u_mul (.a(a), .b(b), .y(prod));
  rev_divider    #(.W(W)) u_div (.a(a), .b(b), .q(quot), .r(unused_rem));

  always_comb begin
    unique case (sl)
      AR_ADD:  begin y = sum;        cout = sum_c;  end
      AR_SUB:  begin y = diff;       cout = diff_c; end
      AR_MUL:  begin y = prod[W-1:0]; cout = 1'b0;  end
      AR_DIV:  begin y = quot;       cout = 1'b0;   end
      default: begin y = '0;         cout = 1'b0;   end
    endcase
  end
endmodule
