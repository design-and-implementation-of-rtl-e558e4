// barrel_shifter: W-bit logarithmic barrel shifter.
//
// mode 00 shifts left logically, 01 right logically, 10 right
// arithmetically and 11 rotates right, by amt = 0 .. W-1 places. It is
// built as log2(W) stages, stage k moving the word by 2**k places when
// amt[k] is set. The document names a barrel shifter in the ALU but gives
// neither its operations nor its structure: both are this design's own.
// Combinational.
module barrel_shifter #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]         a,
  input  logic [$clog2(W)-1:0] amt,
  input  risc_pkg::shift_sel_e mode,
  output logic [W-1:0]         y
);
  import risc_pkg::*;
  localparam int unsigned S = $clog2(W);

  logic [W-1:0] v;
  logic         fill;

  assign fill = (mode == SH_SRA) ? a[W-1] : 1'b0;

  always_comb begin
    v = a;
    for (int k = 0; k < S; k++) begin
      if (amt[k]) begin
        unique case (mode)
          SH_SLL:         v = v << (1 << k);
          SH_SRL, SH_SRA: v = (v >> (1 << k)) | ({W{fill}} << (W - (1 << k)));
          SH_ROR:         v = (v >> (1 << k)) | (v << (W - (1 << k)));
          default:        ;
        endcase
      end
    end
  end

  assign y = v;
endmodule
