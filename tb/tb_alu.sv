// tb_alu: random and corner-case add / subtract checks against longint
// arithmetic truncated to 32 bits.
module tb_alu;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  logic [31:0] a, b, y;

  alu #(.W(32)) dut (.op(op), .a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint unsigned e;
      a  = (n % 7 == 0) ? 32'hFFFF_FFFF : $urandom();
      b  = (n % 11 == 0) ? 32'h0000_0001 : $urandom();
      op = (n % 2 == 0) ? ALU_ADD : ALU_SUB;
      #1;
      e = (op == ALU_ADD) ? longint'(a) + longint'(b) : longint'(a) - longint'(b);
      checks++;
      if (y !== e[31:0]) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, e[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
