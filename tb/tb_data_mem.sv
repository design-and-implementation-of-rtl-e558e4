// tb_data_mem: writes through the processor port and the loader port (the
// processor port winning a same-cycle clash) and checks every read against a
// shadow copy.
module tb_data_mem;
  int checks = 0, failures = 0;
  logic        clk = 0, we, ld_we;
  logic [11:0] addr, ld_addr;
  logic [15:0] wdata, rdata, ld_data;
  logic [15:0] shadow [int];

  data_mem dut (.clk, .we, .addr, .wdata, .rdata, .ld_we, .ld_addr, .ld_data);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ld_we = 0; addr = 0; ld_addr = 0; wdata = 0; ld_data = 0;
    for (int i = 0; i < 400; i++) begin
      ld_we = 1; ld_addr = 12'($urandom_range(0, 255)); ld_data = 16'($urandom);
      @(posedge clk); #1;
      shadow[int'(ld_addr)] = ld_data;
      ld_we = 0;
    end
    for (int i = 0; i < 2000; i++) begin
      addr = 12'($urandom_range(0, 255));
      we = 1'($urandom); wdata = 16'($urandom);
      ld_we = 1'($urandom); ld_addr = 12'($urandom_range(0, 255)); ld_data = 16'($urandom);
      #1;
      if (shadow.exists(int'(addr))) begin
        checks++;
        if (rdata !== shadow[int'(addr)]) begin
          failures++;
          $display("FAIL addr %0d: %h want %h", addr, rdata, shadow[int'(addr)]);
        end
      end
      @(posedge clk); #1;
      if (we) shadow[int'(addr)] = wdata;
      else if (ld_we) shadow[int'(ld_addr)] = ld_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
