// rev_gate: the proposed three-input, three-output reversible logic gate.
//
//   P = A
//   Q = NOT(A + B) xor C
//   R = (A . B)   xor C
//
// The mapping is one to one, so the inputs can be recovered from the
// outputs. One input serves as a control and the other two as data: with
// C = 0 the gate gives NOR on Q and AND on R, with C = 1 it gives OR and
// NAND, with A = 1 R is B xor C and with A = 0 Q is XNOR(B, C). Every logic
// and adder cell of the ALU is built from this gate. The output equations
// follow the document's gate figure; the W-bit vector form (W independent
// gates side by side) is this design's own. Purely combinational.
module rev_gate #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] p,
  output logic [W-1:0] q,
  output logic [W-1:0] r
);
  assign p = a;
  assign q = ~(a | b) ^ c;
  assign r = (a & b) ^ c;
endmodule
