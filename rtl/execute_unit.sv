// execute_unit: EX stage.
//
// The operands read in ID are first corrected by forwarding: if the
// instruction now in ST writes a register that this instruction reads, the
// ST result (fwd_val) replaces the stale value. The ALU then computes the
// result; for a load or store it adds the 7-bit offset to the base register
// to form the address. Result, store data and carry are captured in the
// EX/ST register. With this forwarding and the register file's
// write-through, no instruction ever waits, which keeps the one instruction
// per clock the document claims; the forwarding itself is this design's
// own. Synchronous active-high reset empties the EX/ST register.
module execute_unit (
  input  logic              clk,
  input  logic              reset,
  input  risc_pkg::id_ex_t  id_ex,
  input  logic              fwd_en,
  input  risc_pkg::ridx_t   fwd_idx,
  input  risc_pkg::word_t   fwd_val,
  output risc_pkg::ex_st_t  ex_st
);
  import risc_pkg::*;

  word_t   opa, opb, alu_b, alu_y;
  alu_op_t op;
  logic    alu_c;

  assign opa = (fwd_en && fwd_idx == id_ex.ctrl.rs1) ? fwd_val : id_ex.a;
  assign opb = (fwd_en && fwd_idx == id_ex.ctrl.rs2) ? fwd_val : id_ex.b;

  always_comb begin
    op    = id_ex.ctrl.alu_op;
    alu_b = opb;
    if (id_ex.ctrl.ea_en) begin
      op.unit = U_ARITH;
      op.asel = AR_ADD;
      alu_b   = word_t'(id_ex.ctrl.off);
    end
  end

  alu #(.W(DATA_W)) u_alu (.a(opa), .b(alu_b), .op(op), .y(alu_y), .cout(alu_c));

  always_ff @(posedge clk) begin
    if (reset) begin
      ex_st <= '0;
    end else begin
      ex_st <= '{valid: id_ex.valid, ctrl: id_ex.ctrl, result: alu_y, sdata: opb,
                 cout: alu_c};
    end
  end
endmodule
