// alu: add / subtract unit of an arithmetic pipe (the "AL" block).
//
// Computes a + b or a - b in the ME stage of the arithmetic pipe, selected by
// op. Combinational; the result is registered by the pipe into WB. The add and
// subtract functions follow the design description; the two's-complement
// wrap-around (no overflow trap) is this design's own choice.
module alu
  import vliw_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
    endcase
  end
endmodule
