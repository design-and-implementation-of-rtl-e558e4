// data_mem: data memory (RAM) reached only by load and store instructions.
//
// 2**ADDR_W words of DATA_W bits with a combinational read at addr and one
// write port, written at the rising edge. The processor's store (we) has
// priority on the write port; otherwise the loader port (ld_we) may write,
// which is how initial data is placed. The document gives a separate data
// memory; its size, the read timing and the loader port are this design's
// own. Contents are not reset.
module data_mem #(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  input  logic              ld_we,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [DATA_W-1:0] ld_data
);
  logic [DATA_W-1:0] mem [2**ADDR_W];
  logic [ADDR_W-1:0] waddr;
  logic [DATA_W-1:0] wd;

  assign waddr = we ? addr  : ld_addr;
  assign wd    = we ? wdata : ld_data;

  always_ff @(posedge clk) begin
    if (we || ld_we) mem[waddr] <= wd;
  end

  assign rdata = mem[addr];
endmodule
