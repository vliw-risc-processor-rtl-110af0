// vliw_top: six-slot VLIW - RISC core with a five-stage pipeline
// (IF - ID - RF - ME - WB).
//
// Every cycle the instruction cache hands a six-word bundle to the decode
// stage: one word each for load unit 0, load unit 1, arithmetic unit 0,
// arithmetic unit 1, the store unit and the branch unit. In decode, each unit
// checks its registers in the reservation station. A unit whose registers are
// busy stalls on its own; the others issue their words and leave a no-op
// behind. The bundle leaves decode, and the next one is fetched, once every
// slot has issued; the branch slot is held until it is the last, so a branch
// leaves decode together with its bundle.
//
// Loads and stores use the non-blocking data cache. A load miss is queued for
// the external pipelined SDRAM and its word is written through a fifth
// register write port when it returns, while the destination stays busy in
// the reservation station; the load pipe itself goes on. Stores write
// through to the SDRAM. All units share one register file with nine read
// ports (2 load, 4 arithmetic, 2 store, 1 branch) and five write ports
// (2 load, 2 arithmetic, 1 for returning misses).
//
// The instruction cache holds ICACHE_LINES bundles. A fetch that misses
// leaves decode empty and is repeated every cycle until the refill from
// external instruction memory has brought the bundle in.
//
// Branches are decided in the branch unit's RF stage; the bundle after a
// branch always executes (one delay slot) and fetching then continues at the
// target. If the delay-slot bundle missed in the instruction cache, the
// target is kept until that bundle has been fetched. The program counter
// counts bundles (PCW bits) and wraps.
//
// Clocking: one clock, rising-edge registers. The source design uses two
// non-overlapping clock phases with a latch pair per stage; each pair is one
// flip-flop here, which keeps the stage timing.
//
// Interface: imem_* is the instruction cache's memory port (request /
// ready handshake, word address {bundle, slot}, words back in request order
// at any latency); fetch_en starts fetching from bundle 0 after reset.
// mem_* is the SDRAM port of the data cache. ev_* are one-cycle event strobes
// for stalls, misses and branches; rs_busy and missq_count show the
// reservation-station table and the number of queued SDRAM requests.
module vliw_top
  import vliw_pkg::*;
#(
  parameter int unsigned PCW          = 16,
  parameter int unsigned ICACHE_LINES = 256,
  parameter int unsigned DCACHE_LINES = 256,
  parameter int unsigned MISSQ_DEPTH  = 4,
  localparam int unsigned QCW = $clog2(MISSQ_DEPTH + 1) + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            fetch_en,
  // instruction cache memory port (word address = {bundle, slot})
  output logic            imem_req_valid,
  output logic [PCW+2:0]  imem_req_addr,
  input  logic            imem_req_ready,
  input  logic            imem_resp_valid,
  input  word_t           imem_resp_data,
  // data cache SDRAM port
  output logic            mem_req_valid,
  output logic            mem_req_write,
  output word_t           mem_req_addr,
  output word_t           mem_req_wdata,
  input  logic            mem_req_ready,
  input  logic            mem_resp_valid,
  input  word_t           mem_resp_data,
  // status
  output logic [PCW-1:0]  pc,
  output logic            id_valid,
  output logic            ev_bundle,
  output logic            ev_imiss,
  output logic            ic_refill,
  output logic [5:0]      ev_rs_stall,
  output logic [1:0]      ev_miss,
  output logic [2:0]      ev_queue_stall,
  output logic            ev_fill,
  output logic            ev_store,
  output logic            ev_branch,
  output logic            ev_missq_full,
  output logic [NREGS-1:0] rs_busy,
  output logic [QCW-1:0]  missq_count
);
  localparam int unsigned NU = 6;   // LD0, LD1, AR0, AR1, ST, BR

  // ---------------- IF / ID ----------------
  word_t             bundle [NSLOTS];
  logic [NSLOTS-1:0] slot_done, done_now;
  logic              advance;
  logic [PCW-1:0]    id_pc, fetch_pc, br_target;
  logic              br_redirect;
  logic              ic_hit;
  // A taken branch is decided while its delay-slot bundle is in ID. If that
  // bundle missed in the instruction cache it is not there yet: the target
  // then waits in tgt_pc until the delay slot has been fetched.
  logic              tgt_pend, pend_now;
  logic [PCW-1:0]    tgt_pc, pend_pc;

  assign fetch_pc = (br_redirect && id_valid) ? br_target : pc;
  assign pend_now = tgt_pend || (br_redirect && !id_valid);
  assign pend_pc  = tgt_pend ? tgt_pc : br_target;

  icache #(.LINES(ICACHE_LINES), .NSLOTS(NSLOTS), .W(XLEN), .PCW(PCW)) u_icache (
    .clk, .rst_n,
    .rd_en(advance && fetch_en), .rd_addr(fetch_pc), .rd_hit(ic_hit), .rd_bundle(bundle),
    .mem_req_valid(imem_req_valid), .mem_req_addr(imem_req_addr),
    .mem_req_ready(imem_req_ready), .mem_resp_valid(imem_resp_valid),
    .mem_resp_data(imem_resp_data), .refilling(ic_refill)
  );
  assign ev_imiss = advance && fetch_en && !ic_hit;

  logic u_valid [NU];
  logic u_done  [NU-1];   // slots 0..4; the branch slot has br_done
  logic br_done, others_done;
  for (genvar u = 0; u < NU; u++) begin : g_uv
    assign u_valid[u] = id_valid && !slot_done[u];
  end

  always_comb begin
    for (int u = 0; u < NU - 1; u++) done_now[u] = slot_done[u] || u_done[u];
    others_done      = &done_now[NU-2:0];
    done_now[SLOT_BR] = slot_done[SLOT_BR] || br_done;
    advance = !id_valid || (&done_now);
  end
  assign ev_bundle = id_valid && advance;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= '0;
      id_pc     <= '0;
      id_valid  <= 1'b0;
      slot_done <= '0;
      tgt_pend  <= 1'b0;
      tgt_pc    <= '0;
    end else if (advance) begin
      id_valid  <= fetch_en && ic_hit;
      slot_done <= '0;
      if (fetch_en && ic_hit) begin
        id_pc    <= fetch_pc;
        pc       <= pend_now ? pend_pc : fetch_pc + 1'b1;
        tgt_pend <= 1'b0;
      end else begin
        // a miss (or no fetch): ask again, keep a pending branch target
        pc       <= fetch_pc;
        tgt_pend <= pend_now;
        tgt_pc   <= pend_pc;
      end
    end else begin
      slot_done <= done_now;
      if (br_redirect) pc <= br_target;
    end
  end

  // ---------------- reservation station ----------------
  logic rs_en [NU], rt_en [NU], rd_en [NU], stall [NU], issue [NU];
  reg_t rs [NU], rt [NU], rd [NU];
  // write-backs: four units, then the data-cache miss return
  logic  wbe    [RF_NWRITE];
  reg_t  wbrd   [RF_NWRITE];
  word_t wbdata [RF_NWRITE];

  res_station #(.NUNITS(NU), .NWB(RF_NWRITE), .NREGS(NREGS)) u_rs (
    .clk, .rst_n,
    .chk_rs_en(rs_en), .chk_rs(rs), .chk_rt_en(rt_en), .chk_rt(rt),
    .chk_rd_en(rd_en), .chk_rd(rd), .stall(stall),
    .issue(issue), .wb_en(wbe), .wb_rd(wbrd), .busy_o(rs_busy)
  );

  // the branch waits for every other slot of its bundle
  logic br_hold;
  assign br_hold = stall[SLOT_BR] || !others_done;

  for (genvar u = 0; u < NU - 1; u++) begin : g_ev
    assign ev_rs_stall[u] = stall[u] && u_valid[u] && !u_done[u];
  end
  assign ev_rs_stall[SLOT_BR] = stall[SLOT_BR] && u_valid[SLOT_BR] && !br_done;

  // ---------------- register file ----------------
  reg_t  raddr [RF_NREAD];
  word_t rdata [RF_NREAD];
  logic  we    [RF_NWRITE];
  reg_t  waddr [RF_NWRITE];
  word_t wdata [RF_NWRITE];

  regfile #(.NREGS(NREGS), .W(XLEN), .NREAD(RF_NREAD), .NWRITE(RF_NWRITE)) u_rf (
    .clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata
  );

  for (genvar w = 0; w < RF_NWRITE; w++) begin : g_wp
    assign we[w]    = wbe[w];
    assign waddr[w] = wbrd[w];
    assign wdata[w] = wbdata[w];
  end

  // ---------------- data cache ----------------
  logic  dc_valid [2], dc_hit [2], dc_accept [2];
  word_t dc_addr [2], dc_data [2];
  reg_t  dc_tag [2];
  logic  st_valid, st_accept;
  word_t st_addr, st_data;

  dcache #(.LINES(DCACHE_LINES), .W(XLEN), .AW(XLEN), .TW(RAW), .NPORTS(2),
           .QDEPTH(MISSQ_DEPTH)) u_dc (
    .clk, .rst_n,
    .rd_valid(dc_valid), .rd_addr(dc_addr), .rd_tag(dc_tag), .rd_hit(dc_hit),
    .rd_accept(dc_accept), .rd_data(dc_data),
    .st_valid, .st_addr, .st_data, .st_accept,
    .fill_valid(wbe[4]), .fill_tag(wbrd[4]), .fill_data(wbdata[4]),
    .mem_req_valid, .mem_req_write, .mem_req_addr, .mem_req_wdata, .mem_req_ready,
    .mem_resp_valid, .mem_resp_data,
    .miss_count(missq_count), .miss_queue_full(ev_missq_full)
  );
  assign ev_fill  = wbe[4];
  assign ev_store = st_valid && st_accept;

  // ---------------- load units ----------------
  for (genvar l = 0; l < 2; l++) begin : g_ld
    load_pipe u_ld (
      .clk, .rst_n,
      .id_valid(u_valid[SLOT_LD0+l]), .id_instr(bundle[SLOT_LD0+l]),
      .id_rs_en(rs_en[l]), .id_rs(rs[l]), .id_rd_en(rd_en[l]), .id_rd(rd[l]),
      .id_stall(stall[l]), .id_issue(issue[l]), .id_done(u_done[l]),
      .rf_raddr(raddr[l]), .rf_rdata(rdata[l]),
      .dc_valid(dc_valid[l]), .dc_addr(dc_addr[l]), .dc_tag(dc_tag[l]), .dc_hit(dc_hit[l]),
      .dc_accept(dc_accept[l]), .dc_data(dc_data[l]),
      .miss(ev_miss[l]), .queue_stall(ev_queue_stall[l]),
      .wb_en(wbe[l]), .wb_rd(wbrd[l]), .wb_data(wbdata[l])
    );
    assign rt_en[l] = 1'b0;
    assign rt[l]    = '0;
  end

  // ---------------- arithmetic units ----------------
  for (genvar a = 0; a < 2; a++) begin : g_ar
    arith_pipe u_ar (
      .clk, .rst_n,
      .id_valid(u_valid[SLOT_AR0+a]), .id_instr(bundle[SLOT_AR0+a]),
      .id_rs_en(rs_en[2+a]), .id_rs(rs[2+a]), .id_rt_en(rt_en[2+a]), .id_rt(rt[2+a]),
      .id_rd_en(rd_en[2+a]), .id_rd(rd[2+a]),
      .id_stall(stall[2+a]), .id_issue(issue[2+a]), .id_done(u_done[2+a]),
      .rf_raddr_a(raddr[2+2*a]), .rf_rdata_a(rdata[2+2*a]),
      .rf_raddr_b(raddr[3+2*a]), .rf_rdata_b(rdata[3+2*a]),
      .wb_en(wbe[2+a]), .wb_rd(wbrd[2+a]), .wb_data(wbdata[2+a])
    );
  end

  // ---------------- store unit ----------------
  store_pipe u_st (
    .clk, .rst_n,
    .id_valid(u_valid[SLOT_ST]), .id_instr(bundle[SLOT_ST]),
    .id_rs_en(rs_en[SLOT_ST]), .id_rs(rs[SLOT_ST]),
    .id_rt_en(rt_en[SLOT_ST]), .id_rt(rt[SLOT_ST]),
    .id_stall(stall[SLOT_ST]), .id_issue(issue[SLOT_ST]), .id_done(u_done[SLOT_ST]),
    .rf_raddr_a(raddr[6]), .rf_rdata_a(rdata[6]),
    .rf_raddr_b(raddr[7]), .rf_rdata_b(rdata[7]),
    .st_valid, .st_addr, .st_data, .st_accept,
    .queue_stall(ev_queue_stall[2])
  );
  assign rd_en[SLOT_ST] = 1'b0;
  assign rd[SLOT_ST]    = '0;

  // ---------------- branch unit ----------------
  branch_unit #(.PCW(PCW)) u_br (
    .clk, .rst_n,
    .id_valid(u_valid[SLOT_BR]), .id_instr(bundle[SLOT_BR]), .id_pc,
    .id_rs_en(rs_en[SLOT_BR]), .id_rs(rs[SLOT_BR]),
    .id_stall(br_hold), .id_issue(issue[SLOT_BR]), .id_done(br_done),
    .rf_raddr(raddr[8]), .rf_rdata(rdata[8]),
    .redirect(br_redirect), .target(br_target)
  );
  assign rt_en[SLOT_BR] = 1'b0;
  assign rt[SLOT_BR]    = '0;
  assign rd_en[SLOT_BR] = 1'b0;
  assign rd[SLOT_BR]    = '0;
  assign ev_branch      = br_redirect;
endmodule
