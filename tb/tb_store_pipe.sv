// tb_store_pipe: one store pipe against a register array that changes every
// cycle and a cache store port that refuses a third of the time. Each issued
// store must reach the cache with the address (base + offset) and data read
// in its first RF cycle, in order, two cycles after issue when not refused;
// nothing may issue while the cache refuses, and a refused store must be
// offered again unchanged.
module tb_store_pipe;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic  clk = 0, rst_n = 0;
  logic  id_valid = 0, id_stall = 0;
  word_t id_instr = '0;
  logic  id_rs_en, id_rt_en, id_issue, id_done, st_valid, queue_stall;
  logic  st_accept = 1;
  reg_t  id_rs, id_rt, rf_raddr_a, rf_raddr_b;
  word_t rf_rdata_a, rf_rdata_b, st_addr, st_data;
  word_t regs [NREGS];
  int    cyc = 0, first_issue = -1, n_st = 0, n_ref = 0;

  store_pipe dut (.*);

  always #5 clk = ~clk;
  always_comb rf_rdata_a = regs[rf_raddr_a];
  always_comb rf_rdata_b = regs[rf_raddr_b];

  typedef struct { instr_t ins; int issued; bit known; word_t addr; word_t data; } st_t;
  st_t q [$];

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
        q[i].addr  = regs[q[i].ins.rs] + word_t'($signed({q[i].ins.rt, q[i].ins.lo}));
        q[i].data  = regs[q[i].ins.rd];
        q[i].known = 1;
      end
    if (st_valid) begin
      checks++;
      if (q.size() == 0 || !q[0].known) begin failures++; $display("FAIL unexpected store"); end
      else if (st_addr !== q[0].addr || st_data !== q[0].data) begin
        failures++; $display("FAIL store %h<-%h exp %h<-%h", st_addr, st_data, q[0].addr, q[0].data);
      end
      if (q.size() != 0 && q[0].issued == first_issue) begin
        checks++;
        if (cyc - first_issue != 2) begin failures++; $display("FAIL latency %0d", cyc - first_issue); end
      end
      if (st_accept) begin void'(q.pop_front()); n_st++; end
      else n_ref++;
    end
    if (queue_stall) begin
      checks++;
      if (id_issue) begin failures++; $display("FAIL issue while refused"); end
    end
    if (id_issue) begin
      st_t e;
      e.ins = instr_t'(id_instr); e.issued = cyc; e.known = 0; e.addr = '0; e.data = '0;
      if (first_issue < 0) first_issue = cyc;
      q.push_back(e);
    end
    for (int r = 0; r < NREGS; r++) regs[r] <= $urandom();
  end

  initial begin
    instr_t ins;
    for (int r = 0; r < NREGS; r++) regs[r] = $urandom();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      ins    = instr_t'($urandom());
      ins.op = ($urandom_range(0, 5) == 0) ? ST_NOP : ST_SW;
      id_valid = 1; id_instr = ins;
      forever begin
        bit done;
        id_stall  = ($urandom_range(0, 4) == 0);
        st_accept = (n < 2) || ($urandom_range(0, 2) != 0);
        #1;
        done = id_done;
        checks++;
        if (id_done !== (ins.op != ST_SW || (!id_stall && !queue_stall)) ||
            id_rs_en !== (ins.op == ST_SW) || id_rt_en !== (ins.op == ST_SW) ||
            id_rs !== ins.rs || id_rt !== ins.rd) begin
          failures++; $display("FAIL decode");
        end
        @(negedge clk);
        if (done) break;
      end
    end
    id_valid = 0;
    st_accept = 1;
    repeat (6) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL stores lost"); end
    $display("stores=%0d refusals=%0d", n_st, n_ref);
    checks++; if (n_ref == 0) begin failures++; $display("FAIL never refused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
