// tb_decode_unit: random instructions pass through the ID stage; the
// register indices must come from the fixed fields, the operands read from a
// model register file must land in the ID/EX register one clock later with
// the decoded control word, and stop must flag a valid HLT only.
module tb_decode_unit;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  logic     clk = 0, reset, stop;
  if_id_t   if_id;
  ridx_t    rs1_idx, rs2_idx;
  word_t    rs1_val, rs2_val;
  id_ex_t   id_ex;

  decode_unit dut (.clk, .reset, .if_id, .rs1_idx, .rs2_idx, .rs1_val, .rs2_val, .stop, .id_ex);

  // Model register file: register i holds 16'h1111 * (i + 1).
  assign rs1_val = 16'h1111 * (16'(rs1_idx) + 16'd1);
  assign rs2_val = 16'h1111 * (16'(rs2_idx) + 16'd1);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; if_id = '0;
    @(posedge clk); #1;
    reset = 0;
    checks++;
    if (id_ex.valid !== 1'b0) failures++;
    for (int i = 0; i < 500; i++) begin
      logic [2:0] op;
      word_t      w, wa, wb;
      w = 16'($urandom);
      op = w[15:13];
      if_id = '{valid: 1'($urandom_range(0, 7) != 0), pc: addr_t'(i), instr: w};
      #1;
      wa = 16'h1111 * (16'(w[9:7]) + 16'd1);
      wb = 16'h1111 * (16'((op == 3'd7) ? w[12:10] : w[6:4]) + 16'd1);
      checks++;
      if (stop !== (if_id.valid && op == 3'd0)) begin
        failures++;
        $display("FAIL stop for %h valid %b", w, if_id.valid);
      end
      @(posedge clk); #1;
      checks++;
      if (id_ex.valid !== if_id.valid || id_ex.a !== wa || id_ex.b !== wb ||
          id_ex.ctrl.rd !== w[12:10] || id_ex.ctrl.off !== w[6:0] ||
          id_ex.ctrl.reg_write !== (if_id.valid && op inside {3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6}) ||
          id_ex.ctrl.mem_write !== (if_id.valid && op == 3'd7)) begin
        failures++;
        $display("FAIL ID/EX for %h: a=%h b=%h want %h %h", w, id_ex.a, id_ex.b, wa, wb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
