// store_unit: ST stage, memory access, write-back, status and halt.
//
// The instruction in the EX/ST register finishes here. A load or store uses
// the address computed in EX: addresses with bit 12 clear go to the data
// RAM, addresses with bit 12 set are I/O, where a load takes the data input
// port. Every access shows on addr with rd (load) or wr (store); out carries
// the store data during a store and keeps the last stored value afterwards.
// Loads and ALU instructions write their result back to the register file
// (wb_*), the same value that execute_unit forwards. ALU instructions update
// the status register {carry, negative, zero}. A HLT reaching this stage
// sets halt, which stays high until reset.
// The document puts the register write in the store stage and names a
// status register; the I/O mapping, the status bits and the halt timing are
// this design's own. Synchronous active-high reset.
module store_unit (
  input  logic              clk,
  input  logic              reset,
  input  risc_pkg::ex_st_t  ex_st,
  output logic [11:0]       mem_addr,
  output logic              mem_we,
  output risc_pkg::word_t   mem_wdata,
  input  risc_pkg::word_t   mem_rdata,
  input  risc_pkg::word_t   data,
  output risc_pkg::addr_t   addr,
  output risc_pkg::word_t   out,
  output logic              rd,
  output logic              wr,
  output logic              halt,
  output logic [2:0]        status,
  output logic              wb_en,
  output risc_pkg::ridx_t   wb_idx,
  output risc_pkg::word_t   wb_val
);
  import risc_pkg::*;

  addr_t ea;
  logic  io, is_ld, is_st, alu_ins;
  word_t ld_val, out_q;

  assign ea      = ex_st.result[ADDR_W-1:0];
  assign io      = ea[ADDR_W-1];
  assign is_ld   = ex_st.valid && ex_st.ctrl.mem_read;
  assign is_st   = ex_st.valid && ex_st.ctrl.mem_write;
  assign alu_ins = ex_st.valid && (ex_st.ctrl.arith_en || ex_st.ctrl.logic_en ||
                                   ex_st.ctrl.shift_en);

  assign mem_addr  = ea[11:0];
  assign mem_we    = is_st && !io;
  assign mem_wdata = ex_st.sdata;
  assign ld_val    = io ? data : mem_rdata;

  assign addr = (is_ld || is_st) ? ea : '0;
  assign rd   = is_ld;
  assign wr   = is_st;
  assign out  = is_st ? ex_st.sdata : out_q;

  assign wb_en  = ex_st.valid && ex_st.ctrl.reg_write;
  assign wb_idx = ex_st.ctrl.rd;
  assign wb_val = ex_st.ctrl.mem_read ? ld_val : ex_st.result;

  always_ff @(posedge clk) begin
    if (reset) begin
      out_q  <= '0;
      status <= '0;
      halt   <= 1'b0;
    end else begin
      if (is_st) out_q <= ex_st.sdata;
      if (alu_ins) status <= {ex_st.cout, ex_st.result[DATA_W-1], ex_st.result == '0};
      if (ex_st.valid && ex_st.ctrl.halt) halt <= 1'b1;
    end
  end
endmodule
