// tb_store_unit: random loads, stores, ALU results and HLTs enter the ST
// stage. Checked each cycle: RAM versus I/O steering, the addr/rd/wr/out
// ports, the write-back value (RAM data, data port, or ALU result), and,
// one clock later, the status register and the sticky halt flag.
module tb_store_unit;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, reset;
  ex_st_t      ex_st;
  logic [11:0] mem_addr;
  logic        mem_we, rd, wr, halt, wb_en;
  word_t       mem_wdata, mem_rdata, data, out, wb_val;
  addr_t       addr;
  logic [2:0]  status;
  ridx_t       wb_idx;

  store_unit dut (.clk, .reset, .ex_st, .mem_addr, .mem_we, .mem_wdata, .mem_rdata, .data,
                  .addr, .out, .rd, .wr, .halt, .status, .wb_en, .wb_idx, .wb_val);

  // RAM model: word at address a is a ^ 16'hA5A5.
  assign mem_rdata = 16'(mem_addr) ^ 16'hA5A5;

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] want_status;
    word_t      last_out;
    reset = 1; ex_st = '0; data = '0;
    @(posedge clk); #1;
    reset = 0;
    want_status = '0;
    last_out = '0;
    for (int i = 0; i < 1000; i++) begin
      int kind;
      logic io;
      kind = (i == 990) ? 3 : $urandom_range(0, 2);   // 0 ALU, 1 load, 2 store, 3 HLT
      ex_st = '0;
      ex_st.valid  = 1'($urandom_range(0, 9) != 0);
      ex_st.result = 16'($urandom);
      if (i % 7 == 0) ex_st.result = '0;
      ex_st.sdata  = 16'($urandom);
      ex_st.cout   = 1'($urandom);
      ex_st.ctrl.rd = 3'($urandom);
      unique case (kind)
        0: begin ex_st.ctrl.reg_write = 1; ex_st.ctrl.arith_en = 1; end
        1: begin ex_st.ctrl.reg_write = 1; ex_st.ctrl.mem_read = 1; ex_st.ctrl.ea_en = 1; end
        2: begin ex_st.ctrl.mem_write = 1; ex_st.ctrl.ea_en = 1; end
        default: ex_st.ctrl.halt = 1;
      endcase
      if (i == 990) ex_st.valid = 1;
      data = 16'($urandom);
      io = ex_st.result[12];
      #1;
      checks++;
      if (rd !== (ex_st.valid && kind == 1) || wr !== (ex_st.valid && kind == 2) ||
          mem_we !== (ex_st.valid && kind == 2 && !io) ||
          ((rd || wr) && (addr !== ex_st.result[12:0] || mem_addr !== ex_st.result[11:0])) ||
          (wr && (out !== ex_st.sdata || mem_wdata !== ex_st.sdata)) ||
          (!wr && out !== last_out)) begin
        failures++;
        $display("FAIL ports, kind %0d", kind);
      end
      checks++;
      if (wb_en !== (ex_st.valid && kind < 2) || wb_idx !== ex_st.ctrl.rd ||
          (wb_en && wb_val !== ((kind == 0) ? ex_st.result :
                                io ? data : (16'(ex_st.result[11:0]) ^ 16'hA5A5)))) begin
        failures++;
        $display("FAIL write-back, kind %0d io %b", kind, io);
      end
      if (ex_st.valid && kind == 0)
        want_status = {ex_st.cout, ex_st.result[15], ex_st.result == '0};
      if (wr) last_out = ex_st.sdata;
      @(posedge clk); #1;
      checks++;
      if (status !== want_status || halt !== (i >= 990)) begin
        failures++;
        $display("FAIL status %b want %b halt %b", status, want_status, halt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
