// icache: instruction cache that delivers a whole six-word bundle per cycle
// and refills missing bundles from external instruction memory.
//
// Organisation: direct mapped, LINES lines of one bundle (NSLOTS words),
// indexed by the low bits of the bundle address (the PC) and tagged with the
// rest. The read side is the IF stage: rd_hit tells, in the same cycle,
// whether the bundle at rd_addr is resident; when rd_en and rd_hit are both
// high at a rising edge the bundle is copied into the output register, which
// is the IF/ID pipeline register. With rd_en low the register holds, so a
// stalled decode stage keeps its bundle. The output clears to all no-ops on
// reset.
//
// Refill: a fetch (rd_en) that misses starts a refill of that bundle in the
// next cycle, unless one is running. The refill sends the NSLOTS word
// addresses {bundle, slot} on mem_req_addr, one per cycle when mem_req_ready
// is high, and collects the words from mem_resp_valid/mem_resp_data, which
// must come back in request order at any latency. After the last word the
// line is written and marked valid; the fetch that keeps asking for the
// bundle hits in the following cycle. With a memory of fixed latency L that
// is always ready, a miss therefore costs NSLOTS + L + 1 cycles. One refill
// runs at a time; hits to other lines are served while it runs.
//
// Issuing six words to the units at once follows the design description, as
// do the cache's address and data pins. Line size, mapping, depth and the
// refill protocol are this design's own choices, since no cache organisation
// is published for it. rst_n is both the asynchronous reset and the disable
// of the assertion, which lint tools point out; that double use is intended.
module icache #(
  parameter int unsigned LINES  = 256,
  parameter int unsigned NSLOTS = 6,
  parameter int unsigned W      = 32,
  parameter int unsigned PCW    = 16,
  localparam int unsigned IW    = $clog2(LINES),
  localparam int unsigned SW    = $clog2(NSLOTS),
  localparam int unsigned TW    = PCW - IW
) (
  input  logic             clk,
  input  logic             rst_n,
  // fetch
  input  logic             rd_en,
  input  logic [PCW-1:0]   rd_addr,
  output logic             rd_hit,
  output logic [W-1:0]     rd_bundle [NSLOTS],
  // instruction memory (word address = {bundle, slot})
  output logic             mem_req_valid,
  output logic [PCW+SW-1:0] mem_req_addr,
  input  logic             mem_req_ready,
  input  logic             mem_resp_valid,
  input  logic [W-1:0]     mem_resp_data,
  // status
  output logic             refilling
);
  logic [W-1:0]  words [LINES][NSLOTS];
  logic [TW-1:0] tags  [LINES];
  logic [LINES-1:0] valid;

  logic [IW-1:0] idx;
  assign idx    = rd_addr[IW-1:0];
  assign rd_hit = valid[idx] && tags[idx] == rd_addr[PCW-1:IW];

  // refill state
  logic [PCW-1:0] f_addr;
  logic [SW-1:0]  f_req, f_resp;    // next word to request / to receive
  logic           f_sent_all;
  logic           f_last;
  logic [W-1:0]   f_buf [NSLOTS];

  assign mem_req_valid = refilling && !f_sent_all;
  assign mem_req_addr  = {f_addr, f_req};
  assign f_last        = refilling && mem_resp_valid && 32'(f_resp) == NSLOTS - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      refilling  <= 1'b0;
      f_addr     <= '0;
      f_req      <= '0;
      f_resp     <= '0;
      f_sent_all <= 1'b0;
      valid      <= '0;
    end else if (!refilling) begin
      if (rd_en && !rd_hit) begin
        refilling  <= 1'b1;
        f_addr     <= rd_addr;
        f_req      <= '0;
        f_resp     <= '0;
        f_sent_all <= 1'b0;
        valid[idx] <= 1'b0;
      end
    end else begin
      if (mem_req_valid && mem_req_ready) begin
        f_req <= f_req + 1'b1;
        if (32'(f_req) == NSLOTS - 1) f_sent_all <= 1'b1;
      end
      if (mem_resp_valid) f_resp <= f_resp + 1'b1;
      if (f_last) begin
        refilling <= 1'b0;
        valid[f_addr[IW-1:0]] <= 1'b1;
      end
    end
  end

  // Line contents need no reset: the valid bits guard them.
  always_ff @(posedge clk) begin
    if (refilling && mem_resp_valid) f_buf[f_resp] <= mem_resp_data;
    if (f_last) begin
      tags[f_addr[IW-1:0]] <= f_addr[PCW-1:IW];
      for (int s = 0; s < NSLOTS; s++)
        words[f_addr[IW-1:0]][s] <= (32'(s) == NSLOTS - 1) ? mem_resp_data : f_buf[s];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSLOTS; s++) rd_bundle[s] <= '0;
    end else if (rd_en && rd_hit) begin
      for (int s = 0; s < NSLOTS; s++) rd_bundle[s] <= words[idx][s];
    end
  end

  a_resp_in_refill: assert property (@(posedge clk) disable iff (!rst_n)
                                     mem_resp_valid |-> refilling);
endmodule
