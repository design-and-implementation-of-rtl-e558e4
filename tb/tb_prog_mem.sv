// tb_prog_mem: fills random locations of the program memory through its
// write port and reads them back at random times.
module tb_prog_mem;
  int checks = 0, failures = 0;
  logic        clk = 0, we;
  logic [12:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [int];

  prog_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < 600; i++) begin
      we = 1; waddr = (i < 8) ? 13'(8184 + i) : 13'($urandom); wdata = 16'($urandom);
      @(posedge clk); #1;
      shadow[int'(waddr)] = wdata;
      we = 0;
      if (i % 3 == 0) begin
        raddr = waddr;
        #1;
        checks++;
        if (rdata !== wdata) failures++;
      end
    end
    foreach (shadow[k]) begin
      raddr = 13'(k);
      #1;
      checks++;
      if (rdata !== shadow[k]) begin
        failures++;
        $display("FAIL addr %0d: %h want %h", k, rdata, shadow[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
