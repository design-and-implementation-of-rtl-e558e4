// decode_unit: ID stage.
//
// The control unit decodes the instruction in the IF/ID register while the
// two source registers, whose indices sit in fixed fields, are read from
// the register file (the register file is outside this module; its read
// indices leave on rs1_idx/rs2_idx and the values return on
// rs1_val/rs2_val). Control word and operands are captured in the ID/EX
// register at the clock edge. stop flags a valid HLT so that fetching ends.
// Synchronous active-high reset empties the ID/EX register.
module decode_unit (
  input  logic              clk,
  input  logic              reset,
  input  risc_pkg::if_id_t  if_id,
  output risc_pkg::ridx_t   rs1_idx,
  output risc_pkg::ridx_t   rs2_idx,
  input  risc_pkg::word_t   rs1_val,
  input  risc_pkg::word_t   rs2_val,
  output logic              stop,
  output risc_pkg::id_ex_t  id_ex
);
  import risc_pkg::*;

  ctrl_t ctrl;

  control_unit u_cu (.instr(if_id.instr), .valid(if_id.valid), .ctrl(ctrl));

  assign rs1_idx = ctrl.rs1;
  assign rs2_idx = ctrl.rs2;
  assign stop    = ctrl.halt;

  always_ff @(posedge clk) begin
    if (reset) begin
      id_ex <= '0;
    end else begin
      id_ex <= '{valid: if_id.valid, ctrl: ctrl, a: rs1_val, b: rs2_val};
    end
  end
endmodule
