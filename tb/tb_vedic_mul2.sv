// tb_vedic_mul2: all 16 input pairs of the 2-bit Vedic multiplier against
// x * y.
module tb_vedic_mul2;
  int checks = 0, failures = 0;
  logic [1:0] x, y;
  logic [3:0] q;

  vedic_mul2 dut (.x, .y, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        x = 2'(i); y = 2'(j);
        #1;
        checks++;
        if (q !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
