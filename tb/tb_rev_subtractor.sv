// tb_rev_subtractor: the 16-bit subtractor against a - b - (1 - bin_n) and
// its no-borrow flag, for corner and random operands.
module tb_rev_subtractor;
  int checks = 0, failures = 0;
  logic [15:0] a, b, d;
  logic        bin_n, cout;

  rev_subtractor #(.W(16)) dut (.a, .b, .bin_n, .d, .cout);

  task automatic try(logic [15:0] x, logic [15:0] y, logic bn);
    logic [15:0] want;
    logic        nob;
    a = x; b = y; bin_n = bn;
    #1;
    want = x - y - 16'(!bn);
    nob  = ({1'b0, x} >= ({1'b0, y} + 17'(!bn)));
    checks++;
    if (d !== want || cout !== nob) begin
      failures++;
      $display("FAIL %h - %h (bin_n %b) = %h c%b, want %h c%b", x, y, bn, d, cout, want, nob);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(16'h0000, 16'h0001, 1'b1);
    try(16'h1234, 16'h1234, 1'b1);
    try(16'h1234, 16'h1234, 1'b0);
    try(16'h8000, 16'h0001, 1'b1);
    for (int i = 0; i < 2000; i++) try(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
