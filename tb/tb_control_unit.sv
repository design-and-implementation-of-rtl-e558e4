// tb_control_unit: decodes every opcode with random fields and checks the
// eight control signals, the ALU selects and the register fields against a
// table written from the instruction encoding; a bubble must decode to all
// zeros.
module tb_control_unit;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  word_t instr;
  logic  valid;
  ctrl_t ctrl;

  control_unit dut (.instr, .valid, .ctrl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic [7:0] want;   // reg_write mem_read mem_write arith logic shift ea halt
      logic [2:0] op;
      instr = 16'($urandom);
      op    = 3'(i % 8);
      instr[15:13] = op;
      valid = (i % 17 != 5);
      #1;
      unique case (op)
        3'd0: want = 8'b0000_0001;
        3'd1, 3'd2, 3'd3: want = 8'b1001_0000;
        3'd4: want = 8'b1000_1000;
        3'd5: want = 8'b1000_0100;
        3'd6: want = 8'b1100_0010;
        default: want = 8'b0010_0010;
      endcase
      if (!valid) want = '0;
      checks++;
      if ({ctrl.reg_write, ctrl.mem_read, ctrl.mem_write, ctrl.arith_en, ctrl.logic_en,
           ctrl.shift_en, ctrl.ea_en, ctrl.halt} !== want) begin
        failures++;
        $display("FAIL op %0d valid %b: controls wrong", op, valid);
      end
      checks++;
      if (ctrl.rd !== instr[12:10] || ctrl.rs1 !== instr[9:7] || ctrl.off !== instr[6:0] ||
          ctrl.rs2 !== ((op == 3'd7) ? instr[12:10] : instr[6:4])) begin
        failures++;
        $display("FAIL op %0d: register fields wrong", op);
      end
      if (valid) begin
        checks++;
        unique case (op)
          3'd1: if (ctrl.alu_op.unit != U_ARITH || ctrl.alu_op.asel != AR_ADD) failures++;
          3'd2: if (ctrl.alu_op.unit != U_ARITH || ctrl.alu_op.asel != AR_SUB) failures++;
          3'd3: if (ctrl.alu_op.unit != U_ARITH ||
                    ctrl.alu_op.asel != (instr[0] ? AR_DIV : AR_MUL)) failures++;
          3'd4: if (ctrl.alu_op.unit != U_LOGIC || ctrl.alu_op.lsel != instr[2:0]) failures++;
          3'd5: if (ctrl.alu_op.unit != U_SHIFT || ctrl.alu_op.ssel != instr[1:0]) failures++;
          default: ;
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
