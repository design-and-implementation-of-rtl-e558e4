// tb_rev_gate: exhaustive check of the reversible gate (W = 1) against its
// truth table P = A, Q = NOR(A,B) xor C, R = AND(A,B) xor C, a check that the
// 3-bit mapping is one to one, and a random check of an 8-bit wide copy.
module tb_rev_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  logic [7:0] a8, b8, c8, p8, q8, r8;
  logic [7:0] seen;

  rev_gate #(.W(1)) dut (.a, .b, .c, .p, .q, .r);
  rev_gate #(.W(8)) dut8 (.a(a8), .b(b8), .c(c8), .p(p8), .q(q8), .r(r8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (p !== a || q !== (!(a || b) ^ c) || r !== ((a && b) ^ c)) begin
        failures++;
        $display("FAIL abc=%b pqr=%b%b%b", {a, b, c}, p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL mapping not one to one: %b", seen);
    end
    for (int i = 0; i < 200; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); c8 = 8'($urandom);
      #1;
      checks++;
      if (p8 !== a8 || q8 !== (~(a8 | b8) ^ c8) || r8 !== ((a8 & b8) ^ c8)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
