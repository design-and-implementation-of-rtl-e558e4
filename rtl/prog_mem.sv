// prog_mem: program memory, read-only to the processor.
//
// 2**ADDR_W instructions of DATA_W bits. The fetch stage reads it
// combinationally at raddr (the PC). The only write port belongs to the
// loader, which fills the memory before or while the processor is held in
// reset; it writes at the rising edge when we is high. The document gives a
// separate program memory (ROM) holding 16-bit instructions; its size and
// the loader port are this design's own. Contents are not reset.
module prog_mem #(
  parameter int unsigned ADDR_W = 13,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
