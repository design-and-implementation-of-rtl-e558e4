// tb_risc: end-to-end test of the pipelined processor at its default size.
//
// For each of several random programs the testbench fills the whole data
// memory and the program memory through the loader port, releases reset and
// watches the ports. A reference model, an instruction-at-a-time interpreter
// written from the instruction set, predicts every load (rd/addr), every
// store (wr/addr/out), the status register, the value of I/O loads (the
// data port carries a known function of the cycle number) and the cycle in
// which halt rises. Because the pipeline has no stalls, instruction k must
// reach the store stage in cycle k + 3 after reset and halt must rise in
// cycle N + 4 for a HLT at address N; any extra wait or lost instruction
// shows as a mismatch. Each program ends by storing all eight registers to
// the I/O space so that the final register values are checked too.
//
// Mechanisms counted (each must occur): ST-to-EX forwarding, register-file
// write-through, every opcode, division, every logic function and shift mode, RAM and
// I/O loads and stores, status zero/negative/carry, halt, reset between
// programs.
module tb_risc;
  import risc_pkg::*;

  localparam int NPROG = 12;
  localparam int NRAND = 300;
  localparam int MAXC  = 1024;

  int checks = 0, failures = 0;

  logic        clk = 0, reset;
  word_t       data;
  addr_t       addr;
  word_t       out;
  logic        halt, rd, wr;
  logic [2:0]  status;
  logic        ld_en, ld_sel;
  addr_t       ld_addr;
  word_t       ld_data;

  risc dut (.clk, .reset, .data, .addr, .out, .halt, .rd, .wr, .status,
            .ld_en, .ld_sel, .ld_addr, .ld_data);

  always #5 clk = ~clk;

  // Reference state.
  word_t      m_reg [8];
  word_t      m_ram [4096];
  logic [2:0] m_status;
  word_t      prog [MAXC];
  int         plen;

  // Expected port activity, by cycle.
  logic       e_rd [MAXC];
  logic       e_wr [MAXC];
  addr_t      e_addr [MAXC];
  word_t      e_out [MAXC];
  logic [2:0] e_status [MAXC];

  // Mechanism counters.
  int n_fwd = 0, n_wt = 0, n_ram_ld = 0, n_io_ld = 0, n_ram_st = 0, n_io_st = 0;
  int n_div = 0;
  int n_z = 0, n_n = 0, n_c = 0, n_halt = 0, n_reset = 0;
  int n_op [8];
  int n_lg [8];
  int n_sh [4];

  function automatic word_t io_value(int cyc);
    return word_t'((cyc * 40503) ^ 16'h5A3C);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Build a random program; R6 = 0 (RAM base) and R7 = 16'h1000 (I/O base)
  // are never overwritten by the random part.
  task automatic make_program();
    plen = 0;
    prog[plen++] = enc_m(OP_LD, 3'd7, 3'd6, 7'd1);
    for (int r = 0; r < 6; r++) prog[plen++] = enc_m(OP_LD, 3'(r), 3'd6, 7'(r + 2));
    for (int i = 0; i < NRAND; i++) begin
      int    kind;
      ridx_t rd_i, a_i, b_i, base;
      kind = $urandom_range(0, 9);
      rd_i = 3'($urandom_range(0, 5));
      // Bias the sources toward recent destinations to create hazards.
      a_i  = ($urandom_range(0, 2) == 0) ? 3'($urandom_range(0, 7)) : prog[plen-1][12:10];
      b_i  = ($urandom_range(0, 2) == 0) ? 3'($urandom_range(0, 7)) :
             (plen > 1 ? prog[plen-2][12:10] : 3'd0);
      base = ($urandom_range(0, 4) == 0) ? 3'($urandom_range(0, 5)) :
             ($urandom_range(0, 1) ? 3'd6 : 3'd7);
      case (kind)
        0, 1: prog[plen++] = enc_r(OP_ADD, rd_i, a_i, b_i, 4'($urandom));
        2:    prog[plen++] = enc_r(OP_SUB, rd_i, a_i, b_i, 4'($urandom));
        3:    prog[plen++] = enc_r(OP_MUL, rd_i, a_i, b_i, 4'($urandom));
        4, 5: prog[plen++] = enc_r(OP_LOG, rd_i, a_i, b_i, 4'($urandom));
        6:    prog[plen++] = enc_r(OP_SHF, rd_i, a_i, b_i, 4'($urandom));
        7:    prog[plen++] = enc_m(OP_LD, rd_i, base, 7'($urandom));
        default: prog[plen++] = enc_m(OP_ST, a_i, base, 7'($urandom));
      endcase
    end
    for (int r = 0; r < 8; r++) prog[plen++] = enc_m(OP_ST, 3'(r), 3'd7, 7'(100 + r));
    prog[plen++] = enc_r(OP_HLT, 3'($urandom), 3'($urandom), 3'($urandom), 4'($urandom));
  endtask

  // Run the reference model over the program and fill the expectations.
  task automatic run_model();
    foreach (m_reg[i]) m_reg[i] = '0;
    m_status = '0;
    for (int c = 0; c < MAXC; c++) begin
      e_rd[c] = 0; e_wr[c] = 0; e_addr[c] = '0; e_out[c] = '0; e_status[c] = '0;
    end
    for (int k = 0; k < plen; k++) begin
      word_t   w, x, y, res;
      opcode_e op;
      ridx_t   rd_i, s1, s2;
      addr_t   ea;
      logic    c;
      w    = prog[k];
      op   = opcode_e'(w[15:13]);
      rd_i = w[12:10];
      s1   = w[9:7];
      s2   = (op == OP_ST) ? w[12:10] : w[6:4];
      x    = m_reg[s1];
      y    = m_reg[s2];
      n_op[op]++;
      // Hazard classification against the two previous instructions.
      if (op != OP_HLT) begin
        for (int src = 0; src < 2; src++) begin
          ridx_t s;
          logic  used;
          s    = src ? s2 : s1;
          used = src ? (op inside {OP_ADD, OP_SUB, OP_MUL, OP_LOG, OP_SHF, OP_ST}) : 1'b1;
          if (!used) continue;
          if (k >= 1 && prog[k-1][15:13] inside {3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6} &&
              prog[k-1][12:10] == s)
            n_fwd++;
          else if (k >= 2 && prog[k-2][15:13] inside {3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6} &&
                   prog[k-2][12:10] == s)
            n_wt++;
        end
      end
      ea  = x[12:0] + 13'(w[6:0]);
      res = '0;
      c   = 1'b0;
      unique case (op)
        OP_ADD: {c, res} = {1'b0, x} + {1'b0, y};
        OP_SUB: begin res = x - y; c = (x >= y); end
        OP_MUL: begin
          if (w[0]) begin res = (y == 0) ? 16'hFFFF : x / y; n_div++; end
          else res = x * y;
        end
        OP_LOG: begin
          n_lg[w[2:0]]++;
          unique case (w[2:0])
            3'd0: res = x & y;    3'd1: res = x | y;
            3'd2: res = ~(x & y); 3'd3: res = ~(x | y);
            3'd4: res = x ^ y;    3'd5: res = ~(x ^ y);
            3'd6: res = ~x;       default: res = x;
          endcase
        end
        OP_SHF: begin
          n_sh[w[1:0]]++;
          unique case (w[1:0])
            2'd0: res = x << y[3:0];
            2'd1: res = x >> y[3:0];
            2'd2: res = 16'($signed(x) >>> y[3:0]);
            default: res = (x >> y[3:0]) | (x << (5'd16 - 5'(y[3:0])));
          endcase
        end
        OP_LD: begin
          e_rd[k+3] = 1; e_addr[k+3] = ea;
          if (ea[12]) begin res = io_value(k + 3); n_io_ld++; end
          else begin res = m_ram[ea[11:0]]; n_ram_ld++; end
        end
        OP_ST: begin
          e_wr[k+3] = 1; e_addr[k+3] = ea; e_out[k+3] = y;
          if (ea[12]) n_io_st++;
          else begin m_ram[ea[11:0]] = y; n_ram_st++; end
        end
        default: ;
      endcase
      if (op inside {OP_ADD, OP_SUB, OP_MUL, OP_LOG, OP_SHF}) begin
        m_status = {c, res[15], res == '0};
        if (res == '0) n_z++;
        if (res[15]) n_n++;
        if (c) n_c++;
      end
      if (op inside {OP_ADD, OP_SUB, OP_MUL, OP_LOG, OP_SHF, OP_LD}) m_reg[rd_i] = res;
      e_status[k+4] = m_status;
      if (k + 5 < MAXC) e_status[k+5] = m_status;
    end
    // Hold the status for all later cycles.
    for (int c = plen + 4; c < MAXC; c++) e_status[c] = m_status;
  endtask

  initial begin
    word_t last_out;
    foreach (n_op[i]) n_op[i] = 0;
    foreach (n_lg[i]) n_lg[i] = 0;
    foreach (n_sh[i]) n_sh[i] = 0;
    reset = 1; ld_en = 0; ld_sel = 0; ld_addr = '0; ld_data = '0; data = '0;
    for (int p = 0; p < NPROG; p++) begin
      int halt_cycle;
      make_program();
      reset = 1;
      // Fill data memory: word 0 = 0, word 1 = I/O base, the rest random.
      for (int i = 0; i < 4096; i++) begin
        m_ram[i] = (i == 0) ? 16'h0000 : (i == 1) ? 16'h1000 : 16'($urandom);
        ld_en = 1; ld_sel = 1; ld_addr = addr_t'(i); ld_data = m_ram[i];
        @(posedge clk); #1;
      end
      for (int i = 0; i < plen; i++) begin
        ld_en = 1; ld_sel = 0; ld_addr = addr_t'(i); ld_data = prog[i];
        @(posedge clk); #1;
      end
      ld_en = 0;
      run_model();
      if (p > 0) n_reset++;
      @(posedge clk); #1;
      reset = 0;
      last_out = '0;
      halt_cycle = -1;
      for (int cyc = 0; cyc < plen + 12; cyc++) begin
        data = io_value(cyc);
        #1;
        checks++;
        if (rd !== e_rd[cyc] || wr !== e_wr[cyc] ||
            ((rd || wr) && addr !== e_addr[cyc]) ||
            (wr && out !== e_out[cyc]) || (!wr && out !== last_out)) begin
          failures++;
          $display("FAIL prog %0d cycle %0d: rd=%b wr=%b addr=%h out=%h, want rd=%b wr=%b addr=%h out=%h",
                   p, cyc, rd, wr, addr, out, e_rd[cyc], e_wr[cyc], e_addr[cyc], e_out[cyc]);
        end
        if (wr) last_out = out;
        checks++;
        if (status !== e_status[cyc]) begin
          failures++;
          $display("FAIL prog %0d cycle %0d: status %b want %b", p, cyc, status, e_status[cyc]);
        end
        if (halt && halt_cycle < 0) halt_cycle = cyc;
        @(posedge clk); #1;
      end
      checks++;
      if (halt_cycle != plen - 1 + 4 || !halt) begin
        failures++;
        $display("FAIL prog %0d: halt in cycle %0d, want %0d", p, halt_cycle, plen + 3);
      end else begin
        n_halt++;
      end
    end

    $display("instructions per program %0d; forwarding %0d, write-through %0d",
             NRAND + 16, n_fwd, n_wt);
    $display("divisions %0d", n_div);
    $display("loads ram %0d io %0d, stores ram %0d io %0d; status z %0d n %0d c %0d; halts %0d",
             n_ram_ld, n_io_ld, n_ram_st, n_io_st, n_z, n_n, n_c, n_halt);
    checks++;
    if (n_fwd == 0 || n_wt == 0 || n_ram_ld == 0 || n_io_ld == 0 || n_ram_st == 0 ||
        n_io_st == 0 || n_div == 0 || n_z == 0 || n_n == 0 || n_c == 0 || n_halt == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (n_op[i] == 0 || n_lg[i] == 0 || (i < 4 && n_sh[i] == 0)) begin
        failures++;
        $display("FAIL opcode/function %0d never used", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
