// tb_alu: every ALU operation (four arithmetic, eight logic, four shift)
// on random operands, against an independent reference, including the
// carry output.
module tb_alu;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] a, b, y, want;
  logic        cout, wantc;
  alu_op_t     op;

  alu #(.W(16)) dut (.a, .b, .op, .y, .cout);

  function automatic logic [16:0] ref_alu(alu_op_t o, logic [15:0] x, logic [15:0] z);
    logic [16:0] r;
    r = '0;
    unique case (o.unit)
      U_ARITH:
        unique case (o.asel)
          AR_ADD: r = {1'b0, x} + {1'b0, z};
          AR_SUB: r = {(x >= z), 16'(x - z)};
          AR_MUL: r = {1'b0, 16'(x * z)};
          default: r = {1'b0, (z == 0) ? 16'hFFFF : x / z};
        endcase
      U_LOGIC:
        unique case (o.lsel)
          LG_AND:  r[15:0] = x & z;
          LG_OR:   r[15:0] = x | z;
          LG_NAND: r[15:0] = ~(x & z);
          LG_NOR:  r[15:0] = ~(x | z);
          LG_XOR:  r[15:0] = x ^ z;
          LG_XNOR: r[15:0] = ~(x ^ z);
          LG_NOT:  r[15:0] = ~x;
          default: r[15:0] = x;
        endcase
      U_SHIFT:
        unique case (o.ssel)
          SH_SLL: r[15:0] = x << z[3:0];
          SH_SRL: r[15:0] = x >> z[3:0];
          SH_SRA: r[15:0] = 16'($signed(x) >>> z[3:0]);
          default: r[15:0] = (x >> z[3:0]) | (x << (5'd16 - 5'(z[3:0])));
        endcase
      default: r = '0;
    endcase
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      for (int k = 0; k < 16; k++) begin
        op = '{unit: U_ARITH, asel: AR_ADD, lsel: LG_AND, ssel: SH_SLL};
        if (k < 4) op.asel = arith_sel_e'(k);
        else if (k < 12) begin op.unit = U_LOGIC; op.lsel = logic_sel_e'(k - 4); end
        else begin op.unit = U_SHIFT; op.ssel = shift_sel_e'(k - 12); end
        a = 16'($urandom); b = 16'($urandom);
        if (k == 3 && i % 2 == 0) b = 16'($urandom_range(0, 255));
        #1;
        {wantc, want} = ref_alu(op, a, b);
        checks++;
        if (y !== want || cout !== wantc) begin
          failures++;
          $display("FAIL op %0d a=%h b=%h y=%h/%b want %h/%b", k, a, b, y, cout, want, wantc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
