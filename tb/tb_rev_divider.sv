// tb_rev_divider: the 16-bit restoring divider against / and %, for
// corner cases (divide by zero, by one, by itself, dividend smaller than
// divisor) and random operands with divisors of all sizes.
module tb_rev_divider;
  int checks = 0, failures = 0;
  logic [15:0] a, b, q, r;

  rev_divider #(.W(16)) dut (.a, .b, .q, .r);

  task automatic try(logic [15:0] x, logic [15:0] y);
    logic [15:0] wq, wr;
    a = x; b = y;
    #1;
    wq = (y == 0) ? 16'hFFFF : x / y;
    wr = (y == 0) ? x : x % y;
    checks++;
    if (q !== wq || r !== wr) begin
      failures++;
      $display("FAIL %0d / %0d = %0d r %0d, want %0d r %0d", x, y, q, r, wq, wr);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(16'd1234, 16'd0);
    try(16'hFFFF, 16'd1);
    try(16'hFFFF, 16'hFFFF);
    try(16'd5, 16'd7);
    try(16'd0, 16'd3);
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] d;
      d = 16'($urandom) >> $urandom_range(0, 15);
      try(16'($urandom), d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
