// shifter: arithmetic and logical shift unit of an arithmetic pipe ("Sh").
//
// Shifts a by the low log2(W) bits of amt: left logical, right logical (zero
// fill) or right arithmetic (sign fill), selected by op. Combinational, used
// in the ME stage beside the ALU. Arithmetic and logical shifts follow the
// design description; taking the amount from the low bits of the second
// operand is this design's own choice.
module shifter
  import vliw_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  sh_op_e               op,
  input  logic [W-1:0]         a,
  input  logic [$clog2(W)-1:0] amt,
  output logic [W-1:0]         y
);
  always_comb begin
    unique case (op)
      SH_LL:   y = a << amt;
      SH_RL:   y = a >> amt;
      SH_RA:   y = W'($signed(a) >>> amt);
      default: y = a;
    endcase
  end
endmodule
