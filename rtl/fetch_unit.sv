// fetch_unit: IF stage, program counter and IF/ID register.
//
// Each cycle the PC addresses the program memory, the instruction that
// comes back is captured in the IF/ID register together with its PC, and
// the PC advances by one, so one instruction is fetched per clock. When the
// decode stage reports a HLT (stop), the instruction fetched in that cycle
// is dropped, the PC freezes and only bubbles (valid = 0) follow until
// reset. The PC-plus-one fetch follows the document; the halt behaviour is
// this design's own. Synchronous active-high reset sets the PC to 0.
module fetch_unit #(
  parameter int unsigned ADDR_W = 13
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 stop,
  output logic [ADDR_W-1:0]    pc,
  input  risc_pkg::word_t      instr_in,
  output risc_pkg::if_id_t     if_id
);
  import risc_pkg::*;

  logic stopped;

  always_ff @(posedge clk) begin
    if (reset) begin
      pc      <= '0;
      stopped <= 1'b0;
      if_id   <= '0;
    end else if (stop || stopped) begin
      stopped     <= 1'b1;
      if_id.valid <= 1'b0;
    end else begin
      pc    <= pc + 1'b1;
      if_id <= '{valid: 1'b1, pc: addr_t'(pc), instr: instr_in};
    end
  end
endmodule
