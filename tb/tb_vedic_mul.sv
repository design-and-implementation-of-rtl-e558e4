// tb_vedic_mul: the 4-bit Vedic multiplier (the size the design is drawn
// at) over all 256 operand pairs, and the 16-bit version used by the ALU on
// corner and random operands, against a * b.
module tb_vedic_mul;
  int checks = 0, failures = 0;
  logic [3:0]  a4, b4;
  logic [7:0]  y4;
  logic [15:0] a16, b16;
  logic [31:0] y16;

  vedic_mul dut4 (.a(a4), .b(b4), .y(y4));
  vedic_mul #(.N(16)) dut16 (.a(a16), .b(b16), .y(y16));

  task automatic try16(logic [15:0] x, logic [15:0] y);
    a16 = x; b16 = y;
    #1;
    checks++;
    if (y16 !== 32'(x) * 32'(y)) begin
      failures++;
      $display("FAIL16 %h * %h = %h", x, y, y16);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (y4 !== 8'(i * j)) begin
          failures++;
          $display("FAIL4 %0d * %0d = %0d", i, j, y4);
        end
      end
    end
    try16(16'hFFFF, 16'hFFFF);
    try16(16'hFFFF, 16'h0001);
    try16(16'h8000, 16'h0002);
    for (int i = 0; i < 2000; i++) try16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
