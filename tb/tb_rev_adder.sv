// tb_rev_adder: the 16-bit reversible ripple adder against a + b + cin,
// for corner operands and random ones.
module tb_rev_adder;
  int checks = 0, failures = 0;
  logic [15:0] a, b, s;
  logic        cin, cout;

  rev_adder #(.W(16)) dut (.a, .b, .cin, .s, .cout);

  task automatic try(logic [15:0] x, logic [15:0] y, logic ci);
    logic [16:0] ref_v;
    a = x; b = y; cin = ci;
    #1;
    ref_v = {1'b0, x} + {1'b0, y} + 17'(ci);
    checks++;
    if ({cout, s} !== ref_v) begin
      failures++;
      $display("FAIL %h + %h + %b = %b%h, want %h", x, y, ci, cout, s, ref_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(16'hFFFF, 16'h0001, 1'b0);
    try(16'hFFFF, 16'hFFFF, 1'b1);
    try(16'h0000, 16'h0000, 1'b1);
    try(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < 2000; i++) try(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
