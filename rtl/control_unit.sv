// control_unit: hardwired instruction decoder.
//
// Looks at the opcode bits [15:13] and produces the eight control signals
// of the processor (reg_write, mem_read, mem_write, arith_en, logic_en,
// shift_en, ea_en, halt) together with the ALU operation and the register
// indices, which sit in fixed fields so they can be read while the opcode
// is decoded. The document says the control unit decodes the opcode into
// eight control signals; which eight, and the encoding (see risc_pkg), are
// this design's own; so is sharing the MUL opcode with division (fn[0] = 1),
// which keeps the instruction count at eight. A bubble (valid = 0) decodes to all zeros.
// Combinational.
module control_unit (
  input  risc_pkg::word_t instr,
  input  logic            valid,
  output risc_pkg::ctrl_t ctrl
);
  import risc_pkg::*;

  opcode_e op;
  assign op = opcode_e'(instr[15:13]);

  always_comb begin
    ctrl        = '0;
    ctrl.rd     = instr[12:10];
    ctrl.rs1    = instr[9:7];
    ctrl.rs2    = (op == OP_ST) ? instr[12:10] : instr[6:4];
    ctrl.off    = instr[6:0];
    ctrl.alu_op = '{unit: U_ARITH, asel: AR_ADD, lsel: logic_sel_e'(instr[2:0]),
                    ssel: shift_sel_e'(instr[1:0])};
    if (valid) begin
      unique case (op)
        OP_HLT: ctrl.halt = 1'b1;
        OP_ADD: begin ctrl.reg_write = 1'b1; ctrl.arith_en = 1'b1; end
        OP_SUB: begin
          ctrl.reg_write = 1'b1; ctrl.arith_en = 1'b1; ctrl.alu_op.asel = AR_SUB;
        end
        OP_MUL: begin
          ctrl.reg_write = 1'b1; ctrl.arith_en = 1'b1;
          ctrl.alu_op.asel = instr[0] ? AR_DIV : AR_MUL;
        end
        OP_LOG: begin
          ctrl.reg_write = 1'b1; ctrl.logic_en = 1'b1; ctrl.alu_op.unit = U_LOGIC;
        end
        OP_SHF: begin
          ctrl.reg_write = 1'b1; ctrl.shift_en = 1'b1; ctrl.alu_op.unit = U_SHIFT;
        end
        OP_LD: begin ctrl.reg_write = 1'b1; ctrl.mem_read = 1'b1; ctrl.ea_en = 1'b1; end
        OP_ST: begin ctrl.mem_write = 1'b1; ctrl.ea_en = 1'b1; end
        default: ;
      endcase
    end
  end
endmodule
