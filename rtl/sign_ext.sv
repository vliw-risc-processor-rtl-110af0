// sign_ext: sign extension of an instruction immediate to the data width.
//
// The "Sign" block sits in the decode (ID) stage of both the load pipe and the
// arithmetic pipe. It copies the top bit of the IN_W-bit immediate into every
// upper bit of the OUT_W-bit result. Purely combinational.
// The block's place in the pipeline follows the design description; the
// 18-bit immediate width is this design's own choice.
module sign_ext #(
  parameter int unsigned IN_W  = 18,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  imm,
  output logic [OUT_W-1:0] ext
);
  always_comb ext = {{(OUT_W-IN_W){imm[IN_W-1]}}, imm};
endmodule
