// sign_extend: widens an IN_W-bit two's-complement immediate to OUT_W bits.
//
// The datapath takes its immediate from instruction[7:0] only (IN_W = 8), and
// this unit repeats that field's most significant bit into every upper bit
// of the OUT_W-bit result. It has no logic beyond wiring, so every output bit
// is a straight copy of an input bit. Combinational. The 8-bit immediate
// follows the specification (it overrides the usual 16-bit MIPS field).
module sign_extend #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  imm,
  output logic [OUT_W-1:0] ext
);

  assign ext = {{(OUT_W-IN_W){imm[IN_W-1]}}, imm};

endmodule
