// tb_arith_unit: add (with carry in), subtract, multiply and divide
// selected by SL, against reference arithmetic (small and zero divisors
// included).
module tb_arith_unit;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] a, b, y, want;
  logic        c, cout, wantc;
  arith_sel_e  sl;

  arith_unit #(.W(16)) dut (.a, .b, .c, .sl, .y, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int s = 0; s < 4; s++) begin
        a = 16'($urandom); b = 16'($urandom); c = 1'($urandom);
        if (i < 4) b = a;
        if (i >= 4 && i < 40) b = 16'($urandom_range(0, 300));
        sl = arith_sel_e'(s);
        #1;
        unique case (sl)
          AR_ADD: {wantc, want} = {1'b0, a} + {1'b0, b} + 17'(c);
          AR_SUB: begin
            want  = a - b - 16'(!c);
            wantc = ({1'b0, a} >= ({1'b0, b} + 17'(!c)));
          end
          AR_MUL: begin want = a * b; wantc = 1'b0; end
          default: begin want = (b == 0) ? 16'hFFFF : a / b; wantc = 1'b0; end
        endcase
        checks++;
        if (y !== want || cout !== wantc) begin
          failures++;
          $display("FAIL sl %0d a=%h b=%h c=%b y=%h/%b want %h/%b", s, a, b, c, y, cout, want, wantc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
