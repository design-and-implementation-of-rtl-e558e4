// reg_file: general-purpose register file, two read ports, one write port.
//
// NREGS registers of DATA_W bits. Reads are combinational; the write
// happens at the rising clock edge. A read of the register being written in
// the same cycle returns the new value (write-through), so the ID stage can
// read a result that the ST stage writes in that cycle. Synchronous
// active-high reset clears all registers. The document names the register
// file; its size, the write-through and the reset are this design's own.
module reg_file #(
  parameter int unsigned NREGS  = 8,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned IW    = $clog2(NREGS)
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [IW-1:0]     ra,
  input  logic [IW-1:0]     rb,
  output logic [DATA_W-1:0] qa,
  output logic [DATA_W-1:0] qb,
  input  logic              we,
  input  logic [IW-1:0]     wa,
  input  logic [DATA_W-1:0] wd
);
  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign qa = (we && wa == ra) ? wd : regs[ra];
  assign qb = (we && wa == rb) ? wd : regs[rb];
endmodule
