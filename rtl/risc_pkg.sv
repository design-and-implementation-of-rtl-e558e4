// risc_pkg: types and constants shared by the pipelined reversible Vedic RISC.
//
// The machine is a 16-bit load/store processor with eight general-purpose
// registers, 16-bit fixed-length instructions and a 13-bit address space.
// The instruction encoding below is this design's own; the document only
// says that there are eight instructions covering arithmetic, logic,
// shifting and load/store.
//
//   [15:13] opcode
//   R-type  (ADD SUB MUL LOG SHF): rd[12:10] rs1[9:7] rs2[6:4] fn[3:0]
//                                  MUL with fn[0] = 1 divides instead
//   M-type  (LD ST):               reg[12:10] base[9:7] off[6:0]
//                                  address = R[base][12:0] + off
//   HLT: opcode 000, rest ignored (an all-zero word halts)
//
// LOG fn[2:0] selects the logic function, SHF fn[1:0] the shift mode and
// R[rs2][3:0] the shift amount. Addresses with bit 12 set are I/O: a load
// reads the processor's data input port.
package risc_pkg;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned ADDR_W = 13;
  localparam int unsigned RIDX_W = 3;
  localparam int unsigned NREGS  = 8;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [RIDX_W-1:0] ridx_t;

  typedef enum logic [2:0] {
    OP_HLT = 3'b000,
    OP_ADD = 3'b001,
    OP_SUB = 3'b010,
    OP_MUL = 3'b011,
    OP_LOG = 3'b100,
    OP_SHF = 3'b101,
    OP_LD  = 3'b110,
    OP_ST  = 3'b111
  } opcode_e;

  // Arithmetic unit select (SL[1:0] of the ALU figure).
  typedef enum logic [1:0] {
    AR_ADD = 2'b00,
    AR_SUB = 2'b01,
    AR_MUL = 2'b10,
    AR_DIV = 2'b11
  } arith_sel_e;

  // Logic unit functions, all produced by the reversible gate.
  typedef enum logic [2:0] {
    LG_AND  = 3'd0,
    LG_OR   = 3'd1,
    LG_NAND = 3'd2,
    LG_NOR  = 3'd3,
    LG_XOR  = 3'd4,
    LG_XNOR = 3'd5,
    LG_NOT  = 3'd6,   // ~a
    LG_BUF  = 3'd7    // a
  } logic_sel_e;

  typedef enum logic [1:0] {
    SH_SLL = 2'b00,
    SH_SRL = 2'b01,
    SH_SRA = 2'b10,
    SH_ROR = 2'b11
  } shift_sel_e;

  // ALU output multiplexer select.
  typedef enum logic [1:0] {
    U_ARITH = 2'd0,
    U_LOGIC = 2'd1,
    U_SHIFT = 2'd2
  } alu_unit_e;

  typedef struct packed {
    alu_unit_e  unit;
    arith_sel_e asel;
    logic_sel_e lsel;
    shift_sel_e ssel;
  } alu_op_t;

  // The eight control signals of the control unit, plus the fields the
  // execute stage needs.
  typedef struct packed {
    logic    reg_write;
    logic    mem_read;
    logic    mem_write;
    logic    arith_en;
    logic    logic_en;
    logic    shift_en;
    logic    ea_en;       // load/store address calculation
    logic    halt;
    alu_op_t alu_op;
    ridx_t   rd;
    ridx_t   rs1;
    ridx_t   rs2;
    logic [6:0] off;
  } ctrl_t;

  typedef struct packed {
    logic  valid;
    addr_t pc;
    word_t instr;
  } if_id_t;

  typedef struct packed {
    logic  valid;
    ctrl_t ctrl;
    word_t a;
    word_t b;
  } id_ex_t;

  typedef struct packed {
    logic  valid;
    ctrl_t ctrl;
    word_t result;   // ALU result, or load/store address in [12:0]
    word_t sdata;    // store data
    logic  cout;
  } ex_st_t;

  // Instruction builders, for programs written in testbenches.
  function automatic word_t enc_r(opcode_e op, ridx_t rd, ridx_t rs1, ridx_t rs2,
                                  logic [3:0] fn);
    return {op, rd, rs1, rs2, fn};
  endfunction

  function automatic word_t enc_m(opcode_e op, ridx_t r, ridx_t base, logic [6:0] off);
    return {op, r, base, off};
  endfunction

endpackage
