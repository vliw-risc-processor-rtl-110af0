// tb_branch_unit: random branch, no-op and illegal words with random bundle
// addresses and condition-register values (zero half the time). In the cycle
// after issue, redirect must be high exactly for J, BEQZ with rs = 0 and
// BNEZ with rs != 0, with target = bundle address + offset modulo the store
// size; a held branch must not issue, and rs is checked only for conditional
// branches.
module tb_branch_unit;
  import vliw_pkg::*;
  localparam int PCW = 8;
  int checks = 0, failures = 0;
  logic  clk = 0, rst_n = 0;
  logic  id_valid = 0, id_stall = 0;
  word_t id_instr = '0;
  logic [PCW-1:0] id_pc = '0, target;
  logic  id_rs_en, id_issue, id_done, redirect;
  reg_t  id_rs, rf_raddr;
  word_t rf_rdata;
  word_t regs [NREGS];
  int    n_taken = 0, n_not = 0;

  branch_unit #(.PCW(PCW)) dut (.*);

  always #5 clk = ~clk;
  always_comb rf_rdata = regs[rf_raddr];

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t ins;
    logic [3:0] ops [5] = '{BR_NOP, BR_J, BR_BEQZ, BR_BNEZ, 4'h9};
    for (int r = 0; r < NREGS; r++) regs[r] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      bit legal, taken, issued;
      logic [PCW-1:0] exp_t;
      ins    = instr_t'($urandom());
      ins.op = ops[$urandom_range(0, 4)];
      id_pc  = PCW'($urandom());
      regs[ins.rs] = ($urandom_range(0, 1) == 0) ? '0 : $urandom();
      id_valid = 1; id_instr = ins;
      id_stall = ($urandom_range(0, 3) == 0);
      legal = ins.op inside {BR_J, BR_BEQZ, BR_BNEZ};
      #1;
      checks++;
      if (id_issue !== (legal && !id_stall) || id_done !== (!legal || !id_stall) ||
          id_rs_en !== (ins.op == BR_BEQZ || ins.op == BR_BNEZ) || id_rs !== ins.rs) begin
        failures++; $display("FAIL decode op %0d", ins.op);
      end
      issued = id_issue;
      taken  = issued && (ins.op == BR_J || (ins.op == BR_BEQZ && regs[ins.rs] == 0) ||
                          (ins.op == BR_BNEZ && regs[ins.rs] != 0));
      exp_t  = id_pc + PCW'({ins.rt, ins.lo});
      @(negedge clk);
      id_valid = 0;
      #1;
      checks++;
      if (redirect !== taken || (taken && target !== exp_t)) begin
        failures++;
        $display("FAIL op %0d rs=%h redirect=%0d target=%0d exp %0d/%0d", ins.op, regs[ins.rs],
                 redirect, target, taken, exp_t);
      end
      if (taken) n_taken++; else if (issued) n_not++;
      @(negedge clk);
      checks++;
      if (redirect !== 1'b0) begin failures++; $display("FAIL redirect held"); end
    end
    $display("taken=%0d not_taken=%0d", n_taken, n_not);
    checks++; if (n_taken == 0 || n_not == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
