// tb_barrel_shifter: every shift mode and amount on random words, against
// the shift and rotate operators.
module tb_barrel_shifter;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] a, y, want;
  logic [3:0]  amt;
  shift_sel_e  mode;

  barrel_shifter #(.W(16)) dut (.a, .amt, .mode, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      for (int m = 0; m < 4; m++) begin
        a = (i == 0) ? 16'h8001 : 16'($urandom);
        amt = 4'(i);
        mode = shift_sel_e'(m);
        #1;
        unique case (mode)
          SH_SLL: want = a << amt;
          SH_SRL: want = a >> amt;
          SH_SRA: want = 16'($signed(a) >>> amt);
          SH_ROR: want = (a >> amt) | (a << (5'd16 - 5'(amt)));
          default: want = a;
        endcase
        checks++;
        if (y !== want) begin
          failures++;
          $display("FAIL mode %0d a=%h amt=%0d y=%h want=%h", m, a, amt, y, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
