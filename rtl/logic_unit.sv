// logic_unit: logic operations from one row of proposed reversible gates.
//
// As in the document's logic-unit figure, a reversible gate (W copies, one
// per bit) feeds a multiplexer that picks its Q or R output (P for the
// buffer). One gate input acts as the control and the other two carry data;
// which input is the control for each function is this design's own:
//
//   AND  : A=a B=b C=0 -> R      OR   : A=a B=b C=1 -> Q
//   NAND : A=a B=b C=1 -> R      NOR  : A=a B=b C=0 -> Q
//   XOR  : A=1 B=a C=b -> R      XNOR : A=0 B=a C=b -> Q
//   NOT  : A=0 B=a C=0 -> Q      BUF  : A=a         -> P
//
// Interface: a, b operands (Logic1, Logic2), sel the function
// (risc_pkg::logic_sel_e), y the result. Combinational.
module logic_unit #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]         a,
  input  logic [W-1:0]         b,
  input  risc_pkg::logic_sel_e sel,
  output logic [W-1:0]         y
);
  import risc_pkg::*;

  logic [W-1:0] ga, gb, gc, gp, gq, gr;

  // Input steering: choose the control input and its constant.
  always_comb begin
    ga = a;
    gb = b;
    gc = '0;
    unique case (sel)
      LG_AND, LG_NOR:  begin ga = a;  gb = b;  gc = '0; end
      LG_OR, LG_NAND:  begin ga = a;  gb = b;  gc = '1; end
      LG_XOR:          begin ga = '1; gb = a;  gc = b;  end
      LG_XNOR:         begin ga = '0; gb = a;  gc = b;  end
      LG_NOT:          begin ga = '0; gb = a;  gc = '0; end
      LG_BUF:          begin ga = a;  gb = b;  gc = '0; end
      default:         ;
    endcase
  end

  rev_gate #(.W(W)) u_gate (.a(ga), .b(gb), .c(gc), .p(gp), .q(gq), .r(gr));

  // Output multiplexer.
  always_comb begin
    unique case (sel)
      LG_AND, LG_NAND, LG_XOR:         y = gr;
      LG_OR, LG_NOR, LG_XNOR, LG_NOT:  y = gq;
      LG_BUF:                          y = gp;
      default:                         y = gr;
    endcase
  end
endmodule
