// tb_arith_pipe: random register and immediate forms of every arithmetic
// opcode, plus no-ops and an illegal opcode, issued against a register array
// that changes every cycle. The expected result uses the operand values of
// the instruction's RF cycle; the test checks result, destination and the
// fixed 3-cycle issue-to-write-back latency, that a stalled slot does not
// issue, and that rt is only checked for register forms.
module tb_arith_pipe;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic  clk = 0, rst_n = 0;
  logic  id_valid = 0, id_stall = 0;
  word_t id_instr = '0;
  logic  id_rs_en, id_rt_en, id_rd_en, id_issue, id_done, wb_en;
  reg_t  id_rs, id_rt, id_rd, rf_raddr_a, rf_raddr_b, wb_rd;
  word_t rf_rdata_a, rf_rdata_b, wb_data;
  word_t regs [NREGS];
  int    cyc = 0;
  int    n_op [16] = '{default: 0};

  arith_pipe dut (.*);

  always #5 clk = ~clk;

  always_comb rf_rdata_a = regs[rf_raddr_a];
  always_comb rf_rdata_b = regs[rf_raddr_b];

  typedef struct { instr_t ins; int issued; bit known; word_t y; } ar_t;
  ar_t q [$];

  function automatic word_t model(input instr_t i, input word_t a, input word_t rt);
    word_t b;
    b = i.op[3] ? word_t'($signed({i.rt, i.lo})) : rt;
    case (i.op)
      AR_ADD, AR_ADDI: return a + b;
      AR_SUB, AR_SUBI: return a - b;
      AR_SLL, AR_SLLI: return a << b[4:0];
      AR_SRL, AR_SRLI: return a >> b[4:0];
      default:         return word_t'($signed(a) >>> b[4:0]);
    endcase
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    foreach (q[i])
      if (!q[i].known && cyc > q[i].issued) begin
        q[i].y     = model(q[i].ins, regs[q[i].ins.rs], regs[q[i].ins.rt]);
        q[i].known = 1;
      end
    if (wb_en) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL spurious write-back"); end
      else begin
        ar_t e;
        e = q.pop_front();
        if (wb_rd !== e.ins.rd || wb_data !== e.y || cyc - e.issued != 3) begin
          failures++;
          $display("FAIL op %h r%0d=%h exp r%0d=%h after %0d cycles",
                   e.ins.op, wb_rd, wb_data, e.ins.rd, e.y, cyc - e.issued);
        end
      end
    end
    if (id_issue) begin
      ar_t e;
      e.ins = instr_t'(id_instr); e.issued = cyc; e.known = 0; e.y = '0;
      q.push_back(e);
      n_op[e.ins.op]++;
    end
    for (int r = 0; r < NREGS; r++) regs[r] <= $urandom();
  end

  initial begin
    logic [3:0] ops [12] = '{AR_NOP, AR_ADD, AR_SUB, AR_SLL, AR_SRL, AR_SRA,
                             AR_ADDI, AR_SUBI, AR_SLLI, AR_SRLI, AR_SRAI, 4'h7};
    instr_t ins;
    for (int r = 0; r < NREGS; r++) regs[r] = $urandom();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ins    = instr_t'($urandom());
      ins.op = ops[$urandom_range(0, 11)];
      id_valid = 1; id_instr = ins;
      id_stall = ($urandom_range(0, 3) == 0);
      #1;
      checks++;
      if (id_issue !== (ar_op_legal(ins.op) && !id_stall) ||
          id_done  !== (!ar_op_legal(ins.op) || !id_stall) ||
          id_rt_en !== (ar_op_legal(ins.op) && !ins.op[3]) ||
          id_rs_en !== ar_op_legal(ins.op) || id_rd_en !== ar_op_legal(ins.op)) begin
        failures++; $display("FAIL decode op %h stall %0d", ins.op, id_stall);
      end
    end
    @(negedge clk);
    id_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL results lost"); end
    for (int o = 1; o < 16; o++)
      if (ar_op_legal(4'(o))) begin
        checks++;
        if (n_op[o] == 0) begin failures++; $display("FAIL op %0d never issued", o); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
