// alu: the reversible Vedic ALU.
//
// Following the document's ALU figure, an arithmetic unit (operands Arith1,
// Arith2, select SL[1:0]) and a logic unit (operands Logic1, Logic2) run in
// parallel and an output multiplexer sends one result to the ALU output.
// The barrel shifter, which the document lists as part of the ALU, is a
// third input of that multiplexer. Both units share the operands a and b
// here. The document's figure clocks the units; in this processor the
// EX/ST pipeline register plays that part and the ALU is combinational.
//
// op.unit picks arithmetic, logic or shift; op.asel, op.lsel and op.ssel
// are the unit selects. The shift amount is b[3:0]. cout is the adder's
// carry out (no borrow for subtraction), 0 for other operations.
module alu #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  input  risc_pkg::alu_op_t op,
  output logic [W-1:0]     y,
  output logic             cout
);
  import risc_pkg::*;

  logic [W-1:0] y_ar, y_lg, y_sh;
  logic         c_ar;

  arith_unit #(.W(W)) u_arith (.a(a), .b(b), .c(op.asel == AR_SUB), .sl(op.asel),
                               .y(y_ar), .cout(c_ar));
  logic_unit #(.W(W)) u_logic (.a(a), .b(b), .sel(op.lsel), .y(y_lg));
  barrel_shifter #(.W(W)) u_shift (.a(a), .amt(b[$clog2(W)-1:0]), .mode(op.ssel), .y(y_sh));

  always_comb begin
    unique case (op.unit)
      U_ARITH: begin y = y_ar; cout = c_ar; end
      U_LOGIC: begin y = y_lg; cout = 1'b0; end
      U_SHIFT: begin y = y_sh; cout = 1'b0; end
      default: begin y = '0;   cout = 1'b0; end
    endcase
  end
endmodule
