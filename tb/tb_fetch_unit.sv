// tb_fetch_unit: the PC must start at 0 after reset and advance by one each
// cycle with the fetched word and its PC in the IF/ID register; a stop
// request must drop the word fetched in that cycle, freeze the PC and issue
// only bubbles.
module tb_fetch_unit;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, reset, stop;
  addr_t       pc;
  word_t       instr_in;
  if_id_t      if_id;

  fetch_unit dut (.clk, .reset, .stop, .pc, .instr_in, .if_id);

  // A program memory whose word at address k is k * 3 + 1.
  assign instr_in = 16'(pc) * 16'd3 + 16'd1;

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; stop = 0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    checks++;
    if (pc !== '0 || if_id.valid !== 1'b0) failures++;
    for (int k = 0; k < 40; k++) begin
      @(posedge clk); #1;
      checks++;
      if (!if_id.valid || if_id.pc !== addr_t'(k) || if_id.instr !== 16'(k * 3 + 1) ||
          pc !== addr_t'(k + 1)) begin
        failures++;
        $display("FAIL cycle %0d: pc=%0d if_id.pc=%0d instr=%h", k, pc, if_id.pc, if_id.instr);
      end
    end
    stop = 1;
    @(posedge clk); #1;
    stop = 0;
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (if_id.valid !== 1'b0 || pc !== addr_t'(40)) begin
        failures++;
        $display("FAIL after stop: valid=%b pc=%0d", if_id.valid, pc);
      end
      @(posedge clk); #1;
    end
    reset = 1;
    @(posedge clk); #1;
    reset = 0;
    @(posedge clk); #1;
    checks++;
    if (!if_id.valid || if_id.pc !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
