// res_station: the reservation station, a busy-register table that decides
// which units may issue.
//
// Each unit presents, in its decode (ID) stage, the registers its instruction
// reads and the one it writes. A register is busy from the cycle an
// instruction that writes it issues until the cycle its result is written:
// the WB stage of the unit, or, for a load that missed in the data cache,
// the cycle the miss returns. There are NWB such write-back inputs, one per
// register-file write port. A unit whose source or destination register is busy is stalled
// (stall[u] = 1) and tries again the next cycle; other units are not held.
// A write-back in the current cycle already counts as free, because the write
// lands at the clock edge before the stalled instruction reads its operands in
// the RF stage. When a unit issues (issue[u] = 1, same cycle) its destination
// becomes busy.
// Interface: per unit, combinational check inputs, stall output and issue
// strobe; per write port, a write-back strobe. Strobes act at the next edge.
// Stall-on-busy follows the design description. Checking the destination too
// (write-after-write), counting a same-cycle write-back as free and leaving
// same-bundle conflicts to the compiler are this design's own choices.
module res_station #(
  parameter int unsigned NUNITS = 4,
  parameter int unsigned NWB    = 5,
  parameter int unsigned NREGS  = 32,
  localparam int unsigned AW    = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // decode-stage checks
  input  logic          chk_rs_en [NUNITS],
  input  logic [AW-1:0] chk_rs    [NUNITS],
  input  logic          chk_rt_en [NUNITS],
  input  logic [AW-1:0] chk_rt    [NUNITS],
  input  logic          chk_rd_en [NUNITS],
  input  logic [AW-1:0] chk_rd    [NUNITS],
  output logic          stall     [NUNITS],
  // issue: destination becomes busy
  input  logic          issue     [NUNITS],
  // write-back: destination becomes free
  input  logic          wb_en     [NWB],
  input  logic [AW-1:0] wb_rd     [NWB],
  // status
  output logic [NREGS-1:0] busy_o
);
  logic [NREGS-1:0] busy;
  logic [NREGS-1:0] clr;
  logic [NREGS-1:0] free_now;

  always_comb begin
    clr = '0;
    for (int w = 0; w < NWB; w++)
      if (wb_en[w]) clr[wb_rd[w]] = 1'b1;
    free_now = ~busy | clr;
  end

  always_comb
    for (int u = 0; u < NUNITS; u++)
      stall[u] = (chk_rs_en[u] && !free_now[chk_rs[u]]) ||
                 (chk_rt_en[u] && !free_now[chk_rt[u]]) ||
                 (chk_rd_en[u] && !free_now[chk_rd[u]]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
    end else begin
      for (int r = 0; r < NREGS; r++)
        if (clr[r]) busy[r] <= 1'b0;
      for (int u = 0; u < NUNITS; u++)
        if (issue[u] && chk_rd_en[u]) busy[chk_rd[u]] <= 1'b1;
    end
  end

  assign busy_o = busy;

  // A unit may only issue when it is not stalled.
  for (genvar u = 0; u < NUNITS; u++) begin : g_chk
    a_issue_free: assert property (@(posedge clk) disable iff (!rst_n)
                                   issue[u] |-> !stall[u]);
  end
  // Write-back always frees a register that was busy.
  for (genvar w = 0; w < NWB; w++) begin : g_wb
    a_wb_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                wb_en[w] |-> busy[wb_rd[w]]);
  end
endmodule
