// risc: pipelined 16-bit reversible Vedic RISC processor (top level).
//
// A load/store machine with eight 16-bit registers and eight instructions
// (HLT, ADD, SUB, MUL/DIV, LOG, SHF, LD, ST; encoding in risc_pkg). Instructions
// flow through four stages, one per clock:
//   IF  fetch_unit   PC -> program memory -> IF/ID, PC + 1
//   ID  decode_unit  control unit and register read -> ID/EX
//   EX  execute_unit forwarding, reversible Vedic ALU -> EX/ST
//   ST  store_unit   data memory / I/O access, register write-back
// ST-to-EX forwarding and the register file's write-through remove every
// data hazard, and the ISA has no branches, so the pipeline never stalls:
// an instruction at address k finishes in cycle k + 3 after reset, and
// halt rises in the cycle after a HLT finishes.
//
// Ports data, addr, out, rd, wr and halt keep the names and widths of the
// document's top-level symbol: addr/rd/wr show each load or store in ST,
// out the stored value, data is read by loads from I/O addresses
// (addr[12] = 1). status is the status register {carry, negative, zero}.
// The ld_* port is the loader: with ld_sel = 0 it writes the program
// memory, with ld_sel = 1 the data memory (ld_addr[11:0]); use it while
// reset is held. The four-stage structure, the 16-bit width and the ALU
// follow the document; the encoding, register count, memory sizes, hazard
// handling, I/O map and loader are this design's own. Synchronous
// active-high reset.
module risc #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = 13
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [DATA_W-1:0] data,
  output logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] out,
  output logic              halt,
  output logic              rd,
  output logic              wr,
  output logic [2:0]        status,
  input  logic              ld_en,
  input  logic              ld_sel,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [DATA_W-1:0] ld_data
);
  import risc_pkg::*;

  if (DATA_W != risc_pkg::DATA_W || ADDR_W != risc_pkg::ADDR_W) begin : g_chk
    $error("risc: DATA_W and ADDR_W must match risc_pkg");
  end

  addr_t   pc;
  word_t   instr;
  if_id_t  if_id;
  id_ex_t  id_ex;
  ex_st_t  ex_st;
  logic    stop;
  ridx_t   rs1_idx, rs2_idx, wb_idx;
  word_t   rs1_val, rs2_val, wb_val;
  logic    wb_en;
  logic [11:0] mem_addr;
  logic    mem_we;
  word_t   mem_wdata, mem_rdata;

  prog_mem #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_rom (
    .clk, .we(ld_en && !ld_sel), .waddr(ld_addr), .wdata(ld_data),
    .raddr(pc), .rdata(instr));

  fetch_unit #(.ADDR_W(ADDR_W)) u_if (
    .clk, .reset, .stop, .pc, .instr_in(instr), .if_id);

  decode_unit u_id (
    .clk, .reset, .if_id, .rs1_idx, .rs2_idx, .rs1_val, .rs2_val, .stop, .id_ex);

  reg_file #(.NREGS(NREGS), .DATA_W(DATA_W)) u_rf (
    .clk, .reset, .ra(rs1_idx), .rb(rs2_idx), .qa(rs1_val), .qb(rs2_val),
    .we(wb_en), .wa(wb_idx), .wd(wb_val));

  execute_unit u_ex (
    .clk, .reset, .id_ex, .fwd_en(wb_en), .fwd_idx(wb_idx), .fwd_val(wb_val), .ex_st);

  store_unit u_st (
    .clk, .reset, .ex_st, .mem_addr, .mem_we, .mem_wdata, .mem_rdata, .data,
    .addr, .out, .rd, .wr, .halt, .status, .wb_en, .wb_idx, .wb_val);

  data_mem #(.ADDR_W(ADDR_W-1), .DATA_W(DATA_W)) u_ram (
    .clk, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata),
    .ld_we(ld_en && ld_sel), .ld_addr(ld_addr[ADDR_W-2:0]), .ld_data);
endmodule
