// tb_shifter: every shift amount of each shift kind on random data, checked
// against a bit-by-bit reference.
module tb_shifter;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  sh_op_e op;
  logic [31:0] a, y;
  logic [4:0]  amt;

  shifter #(.W(32)) dut (.op(op), .a(a), .amt(amt), .y(y));

  function automatic logic [31:0] ref_shift(input sh_op_e o, input logic [31:0] x, input int s);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) begin
      case (o)
        SH_LL:   r[i] = (i - s >= 0) ? x[i-s] : 1'b0;
        SH_RL:   r[i] = (i + s < 32) ? x[i+s] : 1'b0;
        default: r[i] = (i + s < 32) ? x[i+s] : x[31];
      endcase
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40; n++)
      for (int k = 0; k < 3; k++)
        for (int s = 0; s < 32; s++) begin
          a   = (n == 0) ? 32'h8000_0001 : $urandom();
          op  = sh_op_e'(k);
          amt = 5'(s);
          #1;
          checks++;
          if (y !== ref_shift(op, a, s)) begin
            failures++;
            $display("FAIL op=%0d a=%h s=%0d y=%h", k, a, s, y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
