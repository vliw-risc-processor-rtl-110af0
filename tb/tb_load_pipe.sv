// tb_load_pipe: one load pipe against a register array that changes every
// cycle and a data-cache stand-in (misses on addresses divisible by 5,
// refuses misses at random to model a full miss queue). Each issued load's
// expected address is the base register's value in its first RF cycle plus
// the offset; the test checks the address and tag the pipe sends to the
// cache, that hits are written back with the right data one cycle later,
// that misses are not, the issue-to-write-back latency of 3 cycles, and that
// nothing issues while the cache refuses a load.
module tb_load_pipe;
  import vliw_pkg::*;
  int checks = 0, failures = 0;
  logic  clk = 0, rst_n = 0;
  logic  id_valid = 0, id_stall = 0;
  word_t id_instr = '0;
  logic  id_rs_en, id_rd_en, id_issue, id_done;
  reg_t  id_rs, id_rd, rf_raddr, dc_tag, wb_rd;
  word_t rf_rdata, dc_addr, dc_data, wb_data;
  logic  dc_valid, dc_hit, dc_accept, miss, queue_stall, wb_en;
  logic  refuse = 0;
  word_t regs [NREGS];
  int    cyc = 0, first_issue = -1;
  int    n_hit = 0, n_miss = 0, n_refuse = 0, n_hold_changed = 0;

  load_pipe dut (.*);

  always #5 clk = ~clk;

  function automatic word_t dword(input word_t a);
    return a ^ 32'hC0DE_0000;
  endfunction

  always_comb rf_rdata = regs[rf_raddr];
  always_comb begin
    dc_hit    = dc_valid && (dc_addr % 5 != 0);
    dc_accept = dc_hit || (dc_valid && !refuse);
    dc_data   = dword(dc_addr);
  end

  typedef struct { reg_t rd; reg_t rs; word_t imm; word_t addr; int issued; bit known; } ld_t;
  ld_t inflight [$];
  ld_t wbq [$];

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard, evaluated on the values of the cycle that is ending.
  always @(posedge clk) if (rst_n) begin
    cyc++;
    // first RF cycle of the youngest load: its base value is now known
    foreach (inflight[i])
      if (!inflight[i].known && cyc > inflight[i].issued) begin
        inflight[i].addr  = regs[inflight[i].rs] + inflight[i].imm;
        inflight[i].known = 1;
      end
    if (wb_en) begin
      checks++;
      if (wbq.size() == 0) begin failures++; $display("FAIL spurious write-back"); end
      else begin
        ld_t e;
        e = wbq.pop_front();
        if (wb_rd !== e.rd || wb_data !== dword(e.addr)) begin
          failures++; $display("FAIL wb r%0d=%h exp r%0d=%h", wb_rd, wb_data, e.rd, dword(e.addr));
        end
        if (e.issued == first_issue) begin
          checks++;
          if (cyc - e.issued != 3) begin
            failures++; $display("FAIL latency %0d", cyc - e.issued);
          end
        end
      end
    end
    if (dc_valid) begin
      checks++;
      if (inflight.size() == 0 || !inflight[0].known) begin
        failures++; $display("FAIL unexpected cache access");
      end else if (dc_addr !== inflight[0].addr || dc_tag !== inflight[0].rd) begin
        failures++;
        $display("FAIL access %h tag %0d exp %h tag %0d", dc_addr, dc_tag, inflight[0].addr, inflight[0].rd);
      end
      if (!dc_accept) n_refuse++;
      else begin
        ld_t e;
        e = inflight.pop_front();
        if (dc_hit) begin n_hit++; wbq.push_back(e); end
        else n_miss++;
      end
    end
    if (queue_stall) begin
      checks++;
      if (id_issue) begin failures++; $display("FAIL issue while cache refuses"); end
    end
    if (id_issue) begin
      instr_t ins;
      ins = instr_t'(id_instr);
      if (first_issue < 0) first_issue = cyc;
      inflight.push_back('{ins.rd, ins.rs, word_t'({{14{ins.rt[4]}}, ins.rt, ins.lo}), '0, cyc, 0});
    end
    // registers change every cycle; a load held in RF must not notice
    for (int r = 0; r < NREGS; r++) regs[r] <= 32'($urandom_range(0, 4095));
  end

  initial begin
    instr_t ins;
    for (int r = 0; r < NREGS; r++) regs[r] = 32'(r * 100);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // one isolated load first: latency check (issued in cycle 1)
    @(negedge clk);
    ins = '{op: LD_LW, rd: 5'd7, rs: 5'd2, rt: 5'd0, lo: 13'd1};
    id_valid = 1; id_instr = ins;
    @(negedge clk);
    id_valid = 0;
    repeat (6) @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      ins.op = ($urandom_range(0, 7) == 0) ? LD_NOP : LD_LW;
      ins.rd = 5'($urandom_range(0, 31));
      ins.rs = 5'($urandom_range(0, 31));
      ins.rt = 5'($urandom_range(0, 31));
      ins.lo = 13'($urandom());
      id_valid = 1; id_instr = ins;
      forever begin
        bit done;
        id_stall = ($urandom_range(0, 4) == 0);
        refuse   = ($urandom_range(0, 2) == 0);
        #1;
        done = id_done;
        checks++;
        if (id_done !== (ins.op != LD_LW || (!id_stall && !queue_stall))) begin
          failures++; $display("FAIL id_done");
        end
        @(negedge clk);
        if (done) break;
      end
    end
    id_valid = 0;
    refuse = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (inflight.size() != 0 || wbq.size() != 0) begin failures++; $display("FAIL loads lost"); end
    $display("hits=%0d misses=%0d refused=%0d", n_hit, n_miss, n_refuse);
    checks++; if (n_hit == 0 || n_miss == 0 || n_refuse == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
