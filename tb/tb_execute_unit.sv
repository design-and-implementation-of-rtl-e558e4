// tb_execute_unit: random ALU, load and store operations enter the EX
// stage with random forwarding; the EX/ST register must hold the reference
// result computed on the forwarded operands, the store data, and for loads
// and stores the base plus offset.
module tb_execute_unit;
  import risc_pkg::*;
  int checks = 0, failures = 0, fwd_hits = 0;
  logic     clk = 0, reset, fwd_en;
  id_ex_t   id_ex;
  ridx_t    fwd_idx;
  word_t    fwd_val;
  ex_st_t   ex_st;
  ctrl_t    ctrl;
  word_t    instr;

  execute_unit dut (.clk, .reset, .id_ex, .fwd_en, .fwd_idx, .fwd_val, .ex_st);
  control_unit u_cu (.instr, .valid(1'b1), .ctrl);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; id_ex = '0; fwd_en = 0; fwd_idx = 0; fwd_val = 0; instr = '0;
    @(posedge clk); #1;
    reset = 0;
    for (int i = 0; i < 1000; i++) begin
      word_t a, b, x, y, want, wsd;
      logic [2:0] op;
      instr = 16'($urandom);
      op = 3'($urandom_range(1, 7));
      instr[15:13] = op;
      #1;
      a = 16'($urandom); b = 16'($urandom);
      id_ex = '{valid: 1'b1, ctrl: ctrl, a: a, b: b};
      fwd_en = 1'($urandom); fwd_idx = 3'($urandom); fwd_val = 16'($urandom);
      x = (fwd_en && fwd_idx == ctrl.rs1) ? fwd_val : a;
      y = (fwd_en && fwd_idx == ctrl.rs2) ? fwd_val : b;
      if (fwd_en && (fwd_idx == ctrl.rs1 || fwd_idx == ctrl.rs2)) fwd_hits++;
      wsd = y;
      unique case (op)
        3'd1: want = x + y;
        3'd2: want = x - y;
        3'd3: want = !instr[0] ? x * y : (y == 0) ? 16'hFFFF : x / y;
        3'd4: unique case (instr[2:0])
                3'd0: want = x & y;    3'd1: want = x | y;
                3'd2: want = ~(x & y); 3'd3: want = ~(x | y);
                3'd4: want = x ^ y;    3'd5: want = ~(x ^ y);
                3'd6: want = ~x;       default: want = x;
              endcase
        3'd5: unique case (instr[1:0])
                2'd0: want = x << y[3:0];
                2'd1: want = x >> y[3:0];
                2'd2: want = 16'($signed(x) >>> y[3:0]);
                default: want = (x >> y[3:0]) | (x << (5'd16 - 5'(y[3:0])));
              endcase
        default: want = x + 16'(instr[6:0]);
      endcase
      @(posedge clk); #1;
      checks++;
      if (!ex_st.valid || ex_st.result !== want || ex_st.sdata !== wsd ||
          ex_st.ctrl !== ctrl) begin
        failures++;
        $display("FAIL instr %h x=%h y=%h: result %h want %h", instr, x, y, ex_st.result, want);
      end
    end
    checks++;
    if (fwd_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
