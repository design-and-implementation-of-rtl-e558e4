// tb_logic_unit: all eight logic functions on random and corner operands,
// against the SystemVerilog bitwise operators.
module tb_logic_unit;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] a, b, y, want;
  logic_sel_e  sel;

  logic_unit #(.W(16)) dut (.a, .b, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      for (int s = 0; s < 8; s++) begin
        a = (i == 0) ? 16'h00FF : 16'($urandom);
        b = (i == 0) ? 16'h0F0F : 16'($urandom);
        sel = logic_sel_e'(s);
        #1;
        unique case (sel)
          LG_AND:  want = a & b;
          LG_OR:   want = a | b;
          LG_NAND: want = ~(a & b);
          LG_NOR:  want = ~(a | b);
          LG_XOR:  want = a ^ b;
          LG_XNOR: want = ~(a ^ b);
          LG_NOT:  want = ~a;
          LG_BUF:  want = a;
          default: want = '0;
        endcase
        checks++;
        if (y !== want) begin
          failures++;
          $display("FAIL sel %0d a=%h b=%h y=%h want=%h", s, a, b, y, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
