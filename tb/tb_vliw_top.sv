// tb_vliw_top: end-to-end run of the whole core at its default sizes.
//
// A generated program of NB bundles sits in an instruction memory model
// (latency ILAT, bundles past it read as no-ops) and runs against the
// behavioural SDRAM, with random SDRAM back-pressure. The program runs twice
// (r31 counts the passes), the second time from a warm instruction cache:
//  - bundles 0-1 set the base registers r1-r3 (r0-r3 are never written
//    again, so every load and store address is known when generating);
//  - bundles 2-21 are independent arithmetic writing only r23-r30; they must
//    take one cycle each plus one instruction-cache refill each on the cold
//    pass, and one cycle each on the warm pass;
//  - bundles 22-25 are a counted loop (r4 from 5 down to 0) closed by a
//    backward BNEZ whose delay slot adds 3 to r6 and stores it on every
//    pass; that bundle must go through decode exactly 10 times;
//  - the rest are random loads, stores, arithmetic (writing r5-r22) and
//    forward branches, with dependences between bundles but none inside one
//    (no slot reads or writes a register another slot writes, no load and
//    store of one address, no branch in a delay slot), then the outer loop.
// A reference model runs the same program bundle by bundle (every slot reads
// before any slot writes, one delay slot after a taken branch) against a
// reference memory. At the end the 32 registers and every stored word in the
// SDRAM are compared. Reservation-station stalls, partial issue, a branch
// held for its bundle, cache hits, misses, hits under outstanding misses,
// miss returns, a full queue, SDRAM back-pressure, stores, taken and
// not-taken branches, instruction-cache hits and misses and a branch target
// kept over a delay-slot miss are counted; each must occur.
module tb_vliw_top;
  import vliw_pkg::*;
  localparam int NB = 200, DEPTH = 256, LAT = 4, ILAT = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic fetch_en = 0;
  logic imem_req_valid, imem_req_ready, imem_resp_valid;
  logic [18:0] imem_req_addr;
  word_t imem_resp_data;
  logic ev_imiss, ic_refill;
  logic  mem_req_valid, mem_req_write, mem_req_ready, mem_resp_valid;
  word_t mem_req_addr, mem_req_wdata, mem_resp_data;
  logic [15:0] pc;
  logic id_valid, ev_bundle, ev_missq_full, ev_fill, ev_store, ev_branch;
  logic [5:0] ev_rs_stall;
  logic [1:0] ev_miss;
  logic [2:0] ev_queue_stall;
  logic [NREGS-1:0] rs_busy;
  logic [3:0] missq_count;
  logic hold = 0;

  vliw_top dut (.*);
  sdram_model #(.LAT(LAT), .W(32)) mem (
    .clk, .rst_n, .hold, .req_valid(mem_req_valid), .req_write(mem_req_write),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .req_ready(mem_req_ready), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data)
  );

  always #5 clk = ~clk;

  // Instruction memory: answers every request ILAT cycles later, in order;
  // bundles past the program read as no-ops.
  logic  iv [ILAT];
  word_t id [ILAT];
  assign imem_req_ready  = 1'b1;
  assign imem_resp_valid = iv[ILAT-1];
  assign imem_resp_data  = id[ILAT-1];
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < ILAT; i++) begin iv[i] <= 0; id[i] <= '0; end
    end else begin
      iv[0] <= imem_req_valid;
      id[0] <= (imem_req_addr[18:3] < 16'(DEPTH) && imem_req_addr[2:0] < 3'(NSLOTS))
               ? prog[imem_req_addr[10:3]][imem_req_addr[2:0]] : '0;
      for (int i = 1; i < ILAT; i++) begin iv[i] <= iv[i-1]; id[i] <= id[i-1]; end
    end

  function automatic word_t mem_word(input word_t a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_1234;
  endfunction

  word_t prog [DEPTH][NSLOTS];
  word_t ref_regs [NREGS];
  word_t ref_mem [word_t];
  word_t base_val [4] = '{32'd0, 32'd64, 32'd1000, -32'sd40};
  int    ref_bundles = 0, ref_loop = 0, dut_loop = 0;

  // ---------------- program generator ----------------
  function automatic word_t mk(input logic [3:0] op, input int rd, input int rs,
                               input int rt, input int lo);
    instr_t i;
    i.op = op; i.rd = reg_t'(rd); i.rs = reg_t'(rs); i.rt = reg_t'(rt); i.lo = 13'(lo);
    return word_t'(i);
  endfunction

  function automatic word_t mk_imm(input logic [3:0] op, input int rd, input int rs, input int imm);
    logic [17:0] v;
    v = 18'(imm);
    return mk(op, rd, rs, int'(v[17:13]), int'(v[12:0]));
  endfunction

  function automatic word_t imm_of(input word_t w);
    instr_t i;
    i = instr_t'(w);
    return word_t'($signed({i.rt, i.lo}));
  endfunction

  task automatic gen_program();
    logic [3:0] ar_ops [10] = '{AR_ADD, AR_SUB, AR_SLL, AR_SRL, AR_SRA,
                                AR_ADDI, AR_SUBI, AR_SLLI, AR_SRLI, AR_SRAI};
    bit prev_branch = 0;
    for (int b = 0; b < DEPTH; b++)
      for (int s = 0; s < NSLOTS; s++) prog[b][s] = '0;
    prog[0][SLOT_AR0] = mk_imm(AR_ADDI, 1, 0, 64);
    prog[0][SLOT_AR1] = mk_imm(AR_ADDI, 2, 0, 1000);
    prog[1][SLOT_AR0] = mk_imm(AR_ADDI, 3, 0, -40);
    prog[1][SLOT_AR1] = mk_imm(AR_ADDI, 31, 0, 2);   // outer pass counter
    // independent arithmetic: sources r1-r3, destinations r23-r30 in turn
    for (int b = 2; b < 22; b++) begin
      prog[b][SLOT_AR0] = mk_imm(AR_ADDI, 23 + (2 * b) % 8, 1 + b % 3, b);
      prog[b][SLOT_AR1] = mk(AR_SUB, 23 + (2 * b + 1) % 8, 2, 1 + b % 3, 0);
    end
    // counted loop
    prog[22][SLOT_AR0] = mk_imm(AR_ADDI, 4, 0, 5);
    prog[23][SLOT_AR0] = mk_imm(AR_SUBI, 4, 4, 1);
    prog[23][SLOT_LD0] = mk_imm(LD_LW, 7, 1, 8);
    prog[24][SLOT_BR]  = mk_imm(BR_BNEZ, 0, 4, -1);
    prog[25][SLOT_AR0] = mk_imm(AR_ADDI, 6, 6, 3);
    prog[25][SLOT_ST]  = mk_imm(ST_SW, 6, 2, 0);
    for (int b = 26; b < NB; b++) begin
      bit written [NREGS];
      int ld_addr [2];
      for (int r = 0; r < NREGS; r++) written[r] = 0;
      ld_addr[0] = -1; ld_addr[1] = -1;
      for (int s = SLOT_LD0; s <= SLOT_AR1; s++) begin
        int rd;
        if ($urandom_range(0, 3) == 0) continue;
        do rd = $urandom_range(5, 22); while (written[rd]);
        written[rd] = 1;
        if (s <= SLOT_LD1) begin
          int base, off;
          base = $urandom_range(0, 3);
          off  = $urandom_range(0, 511);
          prog[b][s] = mk_imm(LD_LW, rd, base, off);
          ld_addr[s] = int'(base_val[base]) + off;
        end else begin
          logic [3:0] op;
          op = ar_ops[$urandom_range(0, 9)];
          if (op[3]) prog[b][s] = mk_imm(op, rd, $urandom_range(0, 31), int'($urandom()));
          else       prog[b][s] = mk(op, rd, $urandom_range(0, 31), $urandom_range(0, 31),
                                     int'($urandom_range(0, 8191)));
        end
      end
      // sources must not be written by another slot of the same bundle
      for (int s = SLOT_AR0; s <= SLOT_AR1; s++) begin
        instr_t i;
        i = instr_t'(prog[b][s]);
        if (i.op != 0 && (written[i.rs] || (!i.op[3] && written[i.rt]))) prog[b][s] = '0;
      end
      if ($urandom_range(0, 2) == 0) begin
        int base, off, dr;
        base = $urandom_range(0, 3);
        off  = $urandom_range(0, 63);
        dr   = $urandom_range(0, 31);
        if (!written[dr] && int'(base_val[base]) + off != ld_addr[0] &&
            int'(base_val[base]) + off != ld_addr[1])
          prog[b][SLOT_ST] = mk_imm(ST_SW, dr, base, off);
      end
      if (!prev_branch && b < NB - 8 && $urandom_range(0, 4) == 0) begin
        int cr;
        logic [3:0] op;
        cr = $urandom_range(5, 30);
        op = ($urandom_range(0, 4) == 0) ? BR_J : ($urandom_range(0, 1) ? BR_BEQZ : BR_BNEZ);
        if (!written[cr]) prog[b][SLOT_BR] = mk_imm(op, 0, cr, $urandom_range(2, 6));
      end
      prev_branch = prog[b][SLOT_BR] != 0;
    end
    // outer loop: the whole program runs twice (second pass from a warm
    // instruction cache)
    for (int s = 0; s < NSLOTS; s++) begin prog[NB-3][s] = '0; prog[NB-2][s] = '0; end
    prog[NB-3][SLOT_AR0] = mk_imm(AR_SUBI, 31, 31, 1);
    prog[NB-2][SLOT_BR]  = mk_imm(BR_BNEZ, 0, 31, 2 - (NB - 2));
  endtask

  task automatic run_reference();
    int rpc, pend;
    for (int r = 0; r < NREGS; r++) ref_regs[r] = '0;
    rpc = 0; pend = -1;
    while (rpc < NB) begin
      word_t nv [NREGS];
      int    npc;
      bit    taken;
      taken = 0;
      for (int r = 0; r < NREGS; r++) nv[r] = ref_regs[r];
      for (int s = 0; s < NSLOTS; s++) begin
        instr_t i;
        word_t a, bb, imm, ad;
        i   = instr_t'(prog[rpc][s]);
        imm = imm_of(prog[rpc][s]);
        a   = ref_regs[i.rs];
        if (s <= SLOT_LD1) begin
          if (i.op == LD_LW) begin
            ad = a + imm;
            nv[i.rd] = ref_mem.exists(ad) ? ref_mem[ad] : mem_word(ad);
          end
        end else if (s <= SLOT_AR1) begin
          if (ar_op_legal(i.op)) begin
            bb = i.op[3] ? imm : ref_regs[i.rt];
            case (i.op)
              AR_ADD, AR_ADDI: nv[i.rd] = a + bb;
              AR_SUB, AR_SUBI: nv[i.rd] = a - bb;
              AR_SLL, AR_SLLI: nv[i.rd] = a << bb[4:0];
              AR_SRL, AR_SRLI: nv[i.rd] = a >> bb[4:0];
              default:         nv[i.rd] = word_t'($signed(a) >>> bb[4:0]);
            endcase
          end
        end else if (s == SLOT_ST) begin
          if (i.op == ST_SW) ref_mem[a + imm] = ref_regs[i.rd];
        end else begin
          taken = (i.op == BR_J) || (i.op == BR_BEQZ && a == 0) || (i.op == BR_BNEZ && a != 0);
        end
      end
      for (int r = 0; r < NREGS; r++) ref_regs[r] = nv[r];
      ref_bundles++;
      if (rpc == 25) ref_loop++;
      npc  = (pend >= 0) ? pend : rpc + 1;
      pend = taken ? (rpc + int'(imm_of(prog[rpc][SLOT_BR]))) % DEPTH : -1;
      rpc  = npc;
    end
  endtask

  // ---------------- monitors ----------------
  int n_bundles = 0;
  int n_rs_stall = 0, n_partial = 0, n_br_wait = 0, n_hit = 0, n_miss = 0, n_hum = 0;
  int n_fill = 0, n_qstall = 0, n_qfull = 0, n_hold = 0, n_store = 0, n_taken = 0, n_br = 0;
  int t_b2 [3], t_b21 [3], n_pass2 = 0, n_pass21 = 0, cyc = 0;
  int n_imiss = 0, n_ihit = 0, n_pend = 0;
  bit was_pend = 0;

  always @(posedge clk) if (rst_n) begin
    bit any_issue, any_stall;
    cyc++;
    if (ev_bundle) begin
      if (dut.id_pc == 16'd2)  begin t_b2[n_pass2]   = cyc; n_pass2++;  end
      if (dut.id_pc == 16'd21) begin t_b21[n_pass21] = cyc; n_pass21++; end
      if (dut.id_pc == 16'd25) dut_loop++;
      n_bundles++;
    end
    any_issue = 0; any_stall = 0;
    for (int u = 0; u < 6; u++) begin
      if (ev_rs_stall[u]) begin n_rs_stall++; any_stall = 1; end
      if (dut.issue[u]) any_issue = 1;
    end
    if (any_issue && any_stall) n_partial++;
    if (dut.u_valid[SLOT_BR] && dut.br_hold && !dut.stall[SLOT_BR] && dut.u_br.is_br) n_br_wait++;
    for (int l = 0; l < 2; l++) begin
      if (dut.dc_valid[l] && dut.dc_hit[l]) begin
        n_hit++;
        if (missq_count != 0) n_hum++;
      end
      if (ev_miss[l]) n_miss++;
    end
    if (ev_queue_stall != 0) n_qstall++;
    if (ev_fill) n_fill++;
    if (ev_missq_full) n_qfull++;
    if (ev_store) n_store++;
    if (ev_branch) n_taken++;
    if (dut.issue[SLOT_BR]) n_br++;
    if (ev_imiss && !ic_refill) n_imiss++;
    if (dut.advance && fetch_en && dut.ic_hit) n_ihit++;
    if (dut.tgt_pend && !was_pend) n_pend++;
    was_pend = dut.tgt_pend;
    if (hold && mem_req_valid) n_hold++;
    hold <= ($urandom_range(0, 3) == 0);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: bundles=%0d", n_bundles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gen_program();
    run_reference();
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    fetch_en = 1;
    wait (pc >= 16'(NB + 2));
    @(negedge clk);
    fetch_en = 0;
    // drain: nothing busy, no request outstanding
    begin
      int quiet = 0;
      while (quiet < 10) begin
        @(negedge clk);
        quiet = (rs_busy == 0 && missq_count == 0 && !id_valid && !ic_refill) ? quiet + 1 : 0;
      end
    end
    for (int r = 0; r < NREGS; r++) begin
      checks++;
      if (dut.u_rf.regs[r] !== ref_regs[r]) begin
        failures++;
        $display("FAIL r%0d = %h exp %h", r, dut.u_rf.regs[r], ref_regs[r]);
      end
    end
    foreach (ref_mem[a]) begin
      checks++;
      if (mem.peek(a) !== ref_mem[a]) begin
        failures++; $display("FAIL memory %h = %h exp %h", a, mem.peek(a), ref_mem[a]);
      end
    end
    checks++;
    // bundles 3-21 each miss in the cold instruction cache: one cycle in
    // decode plus a refill of NSLOTS words from a memory of latency ILAT
    if (n_pass2 != 2 || n_pass21 != 2) begin
      failures++; $display("FAIL bundles 2 / 21 decoded %0d / %0d times", n_pass2, n_pass21);
    end else begin
      checks++;
      if (t_b21[0] - t_b2[0] != 19 * (1 + NSLOTS + ILAT + 1)) begin
        failures++;
        $display("FAIL cold: independent bundles took %0d cycles, exp %0d", t_b21[0] - t_b2[0],
                 19 * (1 + NSLOTS + ILAT + 1));
      end
      checks++;
      if (t_b21[1] - t_b2[1] != 19) begin
        failures++;
        $display("FAIL warm: independent bundles took %0d cycles for 19", t_b21[1] - t_b2[1]);
      end
    end
    checks++;
    if (ref_loop != 10 || dut_loop != 10) begin
      failures++; $display("FAIL loop delay slot ran %0d / %0d times, exp 10", dut_loop, ref_loop);
    end
    $display("cycles=%0d bundles=%0d ref_bundles=%0d rs_stalls=%0d partial_issue=%0d branch_wait=%0d",
             cyc, n_bundles, ref_bundles, n_rs_stall, n_partial, n_br_wait);
    $display("hits=%0d misses=%0d hit_under_miss=%0d fills=%0d queue_stall=%0d queue_full=%0d backpressure=%0d stores=%0d branches=%0d taken=%0d",
             n_hit, n_miss, n_hum, n_fill, n_qstall, n_qfull, n_hold, n_store, n_br, n_taken);
    checks++; if (n_rs_stall == 0) begin failures++; $display("FAIL no reservation-station stall"); end
    checks++; if (n_partial == 0) begin failures++; $display("FAIL no partial issue"); end
    checks++; if (n_br_wait == 0) begin failures++; $display("FAIL branch never waited for its bundle"); end
    checks++; if (n_hit == 0) begin failures++; $display("FAIL no cache hit"); end
    checks++; if (n_miss == 0 || n_fill != n_miss) begin failures++; $display("FAIL misses %0d fills %0d", n_miss, n_fill); end
    checks++; if (n_hum == 0) begin failures++; $display("FAIL no hit under miss"); end
    checks++; if (n_qstall == 0 || n_qfull == 0) begin failures++; $display("FAIL queue never full"); end
    checks++; if (n_hold == 0) begin failures++; $display("FAIL no SDRAM back-pressure"); end
    $display("icache: misses=%0d hits=%0d delayed_targets=%0d", n_imiss, n_ihit, n_pend);
    checks++; if (n_imiss == 0 || n_ihit == 0) begin failures++; $display("FAIL icache hit/miss coverage"); end
    checks++; if (n_pend == 0) begin failures++; $display("FAIL no branch target kept over a delay-slot miss"); end
    checks++; if (n_store == 0) begin failures++; $display("FAIL no store"); end
    checks++; if (n_taken < 4 || n_br <= n_taken) begin failures++; $display("FAIL branch coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
