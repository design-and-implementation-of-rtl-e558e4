// tb_reg_file: random writes and reads of the 8 x 16 register file against
// a shadow array, including reset to zero and same-cycle write-through.
module tb_reg_file;
  int checks = 0, failures = 0;
  logic        clk = 0, reset, we;
  logic [2:0]  ra, rb, wa;
  logic [15:0] qa, qb, wd;
  logic [15:0] shadow [8];
  int          wt = 0;

  reg_file dut (.clk, .reset, .ra, .rb, .qa, .qb, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; we = 0; ra = 0; rb = 0; wa = 0; wd = 0;
    @(posedge clk); #1;
    reset = 0;
    foreach (shadow[i]) shadow[i] = '0;
    for (int i = 0; i < 8; i++) begin
      ra = 3'(i); #1;
      checks++;
      if (qa !== 16'h0) failures++;
    end
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom); wa = 3'($urandom); wd = 16'($urandom);
      ra = 3'($urandom); rb = (i % 4 == 0) ? wa : 3'($urandom);
      #1;
      checks++;
      if (qa !== ((we && wa == ra) ? wd : shadow[ra]) ||
          qb !== ((we && wa == rb) ? wd : shadow[rb])) begin
        failures++;
        $display("FAIL read ra=%0d rb=%0d", ra, rb);
      end
      if (we && (wa == ra || wa == rb)) wt++;
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1;
    end
    checks++;
    if (wt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
