// tb_sign_ext: checks the immediate sign extension against integer
// arithmetic: every value of a 10-bit immediate and random 18-bit ones.
module tb_sign_ext;
  int checks = 0, failures = 0;
  logic [17:0] imm;
  logic [31:0] ext;
  logic [9:0]  imm10;
  logic [31:0] ext10;

  sign_ext #(.IN_W(18), .OUT_W(32)) dut (.imm(imm), .ext(ext));
  sign_ext #(.IN_W(10), .OUT_W(32)) dut10 (.imm(imm10), .ext(ext10));

  function automatic int sval(input int unsigned v, input int bits);
    return (v >= (1 << (bits - 1))) ? int'(v) - (1 << bits) : int'(v);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      imm10 = 10'(v);
      #1;
      checks++;
      if (ext10 !== 32'(sval(v, 10))) begin
        failures++;
        $display("FAIL 10-bit %0d -> %h", v, ext10);
      end
    end
    for (int n = 0; n < 4000; n++) begin
      int unsigned v;
      v = (n < 4) ? (n == 0 ? 0 : n == 1 ? 18'h1FFFF : n == 2 ? 18'h20000 : 18'h3FFFF)
                  : ($urandom() & 18'h3FFFF);
      imm = 18'(v);
      #1;
      checks++;
      if (ext !== 32'(sval(v, 18))) begin
        failures++;
        $display("FAIL 18-bit %h -> %h", v, ext);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
