// vedic_mul: N x N bit Vedic multiplier by divide and conquer, y = a * b.
//
// The document builds a 4-bit multiplier from four 2-bit Vedic multipliers
// and three adders. The same step is repeated here level by level so any
// power-of-two N >= 2 can be built (the 16-bit ALU uses N = 16):
//   level 0      : a 2-bit vedic_mul2 for every pair of 2-bit digits of a
//                  and b (digit i of a with digit j of b);
//   level l >= 1 : for every pair of 2**(l+1)-bit digits, a vedic_combine
//                  joins the four level l-1 products of its halves.
// The last level holds the single N-bit x N-bit product. For N = 4 this is
// exactly the document's figure: four 2-bit multipliers and one combine
// step of three adders. Extending the recursion beyond 4 bits is this
// design's own. Combinational.
module vedic_mul #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] y
);
  localparam int unsigned L = $clog2(N);   // number of levels

  if (N < 2 || (1 << L) != N) begin : g_bad
    $error("vedic_mul: N must be a power of two and at least 2");
  end

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int unsigned S  = 2 << l;   // digit width at this level
    localparam int unsigned NB = N / S;    // digits per operand
    logic [2*S-1:0] p [NB][NB];            // p[i][j] = a digit i * b digit j

    for (genvar i = 0; i < NB; i++) begin : g_i
      for (genvar j = 0; j < NB; j++) begin : g_j
        if (l == 0) begin : g_leaf
          vedic_mul2 u_m (.x(a[2*i +: 2]), .y(b[2*j +: 2]), .q(p[i][j]));
        end else begin : g_node
          vedic_combine #(.N(S)) u_c (
            .x0(g_lvl[l-1].p[2*i][2*j]),
            .x1(g_lvl[l-1].p[2*i][2*j+1]),
            .x2(g_lvl[l-1].p[2*i+1][2*j]),
            .x3(g_lvl[l-1].p[2*i+1][2*j+1]),
            .y(p[i][j]));
        end
      end
    end
  end

  assign y = g_lvl[L-1].p[0][0];
endmodule
