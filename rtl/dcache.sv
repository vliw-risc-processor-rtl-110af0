// dcache: non-blocking, write-through data cache with two load ports, one
// store port, and queues in front of a pipelined SDRAM.
//
// Organisation: direct mapped, LINES lines of one word, word addresses.
// Every port looks its address up combinationally in the ME stage.
//  - Load hit: rd_hit and rd_data answer in the same cycle; the load pipe
//    writes the word back itself.
//  - Load miss: the load is not held. Its address and destination tag (the
//    register number) go into the request queue and rd_accept tells the pipe
//    the load is taken care of. Only a full queue makes rd_accept low.
//  - Store: the word updates the line if the address is resident (no
//    allocation on a miss) and always goes into the request queue as an
//    SDRAM write. A store that finds the queue full is refused, and loads are
//    refused with it, so no later load can pass it. A load in the same cycle
//    to the store's address gets the stored word.
// The request queue (QDEPTH entries) sends one request per cycle to the
// SDRAM, in order, stores included, so a load that misses after a store to
// the same address reads the new word. Each read sent moves to the response
// queue (also QDEPTH entries, the number of SDRAM pipeline stages), which
// pairs the in-order SDRAM answers with their tags. A returning word goes out
// on fill_valid/fill_tag/fill_data, the register-file write port reserved for
// returning misses, fills its line, and is forwarded to a load asking for the
// same address that cycle. A read overtaken by a later store to its address
// still returns its (older) word to its register but neither fills the line
// nor is forwarded.
// Memory interface: mem_req_valid/ready handshake with mem_req_write,
// mem_req_addr and mem_req_wdata; mem_resp_valid/mem_resp_data return read
// words in request order. Writes have no response.
// Non-blocking operation, the external SDRAM and a queue sized to the SDRAM
// pipeline follow the design description. Line size, mapping, depth,
// write-through without allocation, in-order responses, the separate
// register write port for returning misses and forwarding are this design's
// own choices. Each miss is its own SDRAM request.
module dcache #(
  parameter int unsigned LINES  = 256,
  parameter int unsigned W      = 32,
  parameter int unsigned AW     = 32,
  parameter int unsigned TW     = 5,
  parameter int unsigned NPORTS = 2,
  parameter int unsigned QDEPTH = 4,
  localparam int unsigned IDXW  = $clog2(LINES),
  localparam int unsigned TAGW  = AW - IDXW,
  localparam int unsigned QW    = (QDEPTH > 1) ? $clog2(QDEPTH) : 1,
  localparam int unsigned CW    = $clog2(QDEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // load ports
  input  logic          rd_valid  [NPORTS],
  input  logic [AW-1:0] rd_addr   [NPORTS],
  input  logic [TW-1:0] rd_tag    [NPORTS],
  output logic          rd_hit    [NPORTS],
  output logic          rd_accept [NPORTS],
  output logic [W-1:0]  rd_data   [NPORTS],
  // store port
  input  logic          st_valid,
  input  logic [AW-1:0] st_addr,
  input  logic [W-1:0]  st_data,
  output logic          st_accept,
  // returning misses
  output logic          fill_valid,
  output logic [TW-1:0] fill_tag,
  output logic [W-1:0]  fill_data,
  // SDRAM side
  output logic          mem_req_valid,
  output logic          mem_req_write,
  output logic [AW-1:0] mem_req_addr,
  output logic [W-1:0]  mem_req_wdata,
  input  logic          mem_req_ready,
  input  logic          mem_resp_valid,
  input  logic [W-1:0]  mem_resp_data,
  // status
  output logic [CW:0]   miss_count,
  output logic          miss_queue_full
);
  logic [LINES-1:0] valid;
  logic [TAGW-1:0]  tags  [LINES];
  logic [W-1:0]     words [LINES];

  // request queue
  logic [AW-1:0] q_addr   [QDEPTH];
  logic [TW-1:0] q_tag    [QDEPTH];
  logic [W-1:0]  q_wdata  [QDEPTH];
  logic          q_write  [QDEPTH];
  logic          q_nofill [QDEPTH];
  logic [QW-1:0] q_head, q_tail;
  logic [CW-1:0] q_cnt;
  // response queue
  logic [AW-1:0] r_addr   [QDEPTH];
  logic [TW-1:0] r_tag    [QDEPTH];
  logic          r_nofill [QDEPTH];
  logic [QW-1:0] r_head, r_tail;
  logic [CW-1:0] r_cnt;

  function automatic logic [QW-1:0] qinc(input logic [QW-1:0] p);
    return (32'(p) == QDEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  // Returning word: oldest entry of the response queue.
  logic [AW-1:0]   fill_addr;
  logic [IDXW-1:0] fill_idx;
  logic            fill_ok;
  always_comb begin
    fill_addr = r_addr[r_head];
    fill_idx  = fill_addr[IDXW-1:0];
    // an overtaken read, or one overtaken in this very cycle, does not fill
    fill_ok   = mem_resp_valid && !r_nofill[r_head] &&
                !(st_accept && st_addr == fill_addr);
  end
  assign fill_valid = mem_resp_valid;
  assign fill_tag   = r_tag[r_head];
  assign fill_data  = mem_resp_data;

  // Store lookup and queue slot.
  logic [IDXW-1:0] st_idx;
  logic            st_hit;
  always_comb begin
    st_idx    = st_addr[IDXW-1:0];
    st_hit    = valid[st_idx] && (tags[st_idx] == st_addr[AW-1:IDXW]);
    st_accept = st_valid && (32'(q_cnt) < QDEPTH);
  end

  // Load lookup, misses and queue slots (store first, then port 0, 1, ...).
  logic          push  [NPORTS];
  logic [QW-1:0] pslot [NPORTS];
  logic [QW-1:0] tail_n;
  logic [CW-1:0] npush;
  logic          st_block;
  always_comb begin
    st_block = st_valid && !st_accept;
    tail_n   = st_accept ? qinc(q_tail) : q_tail;
    npush    = CW'(st_accept);
    for (int p = 0; p < NPORTS; p++) begin
      logic [IDXW-1:0] idx;
      logic            arr_hit, fwd_fill, fwd_st;
      idx      = rd_addr[p][IDXW-1:0];
      arr_hit  = valid[idx] && (tags[idx] == rd_addr[p][AW-1:IDXW]);
      fwd_fill = fill_ok && (fill_addr == rd_addr[p]);
      fwd_st   = st_accept && (st_addr == rd_addr[p]);
      rd_hit[p]  = rd_valid[p] && !st_block && (arr_hit || fwd_fill || fwd_st);
      rd_data[p] = fwd_st ? st_data : fwd_fill ? mem_resp_data : words[idx];
      push[p]    = rd_valid[p] && !st_block && !rd_hit[p] &&
                   (32'(q_cnt) + 32'(npush) < QDEPTH);
      rd_accept[p] = rd_hit[p] || push[p];
      pslot[p]   = tail_n;
      if (push[p]) begin
        tail_n = qinc(tail_n);
        npush  = npush + 1'b1;
      end
    end
  end

  // Sending: a read also needs room in the response queue; the entry of a
  // word returning this cycle counts as free, so a full SDRAM pipeline keeps
  // streaming one word per cycle.
  logic sent, sent_read, sent_nofill;
  always_comb begin
    mem_req_valid = (q_cnt != 0) &&
                    (q_write[q_head] || 32'(r_cnt) < QDEPTH || mem_resp_valid);
    mem_req_write = q_write[q_head];
    mem_req_addr  = q_addr[q_head];
    mem_req_wdata = q_wdata[q_head];
    sent          = mem_req_valid && mem_req_ready;
    sent_read     = sent && !q_write[q_head];
    sent_nofill   = q_nofill[q_head] || (st_accept && st_addr == q_addr[q_head]);
  end

  assign miss_count      = (CW+1)'(q_cnt) + (CW+1)'(r_cnt);
  assign miss_queue_full = 32'(q_cnt) == QDEPTH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= '0;
      q_head <= '0;
      q_tail <= '0;
      q_cnt  <= '0;
      r_head <= '0;
      r_tail <= '0;
      r_cnt  <= '0;
    end else begin
      if (fill_ok) valid[fill_idx] <= 1'b1;
      if (mem_resp_valid) r_head <= qinc(r_head);
      if (sent) q_head <= qinc(q_head);
      if (sent_read) r_tail <= qinc(r_tail);
      q_tail <= tail_n;
      q_cnt  <= q_cnt + npush - CW'(sent);
      r_cnt  <= r_cnt + CW'(sent_read) - CW'(mem_resp_valid);
    end
  end

  // Line contents and queue entries need no reset: valid bits and counters
  // guard every read of them.
  always_ff @(posedge clk) begin
    if (st_accept && st_hit) words[st_idx] <= st_data;
    if (fill_ok) begin
      tags[fill_idx]  <= fill_addr[AW-1:IDXW];
      words[fill_idx] <= mem_resp_data;
    end
    // a store overtakes every queued read of its address
    for (int i = 0; i < QDEPTH; i++) begin
      if (st_accept && !q_write[i] && q_addr[i] == st_addr) q_nofill[i] <= 1'b1;
      if (st_accept && r_addr[i] == st_addr) r_nofill[i] <= 1'b1;
    end
    if (st_accept) begin
      q_addr[q_tail]   <= st_addr;
      q_wdata[q_tail]  <= st_data;
      q_write[q_tail]  <= 1'b1;
      q_nofill[q_tail] <= 1'b0;
      q_tag[q_tail]    <= '0;
    end
    for (int p = 0; p < NPORTS; p++)
      if (push[p]) begin
        q_addr[pslot[p]]   <= rd_addr[p];
        q_tag[pslot[p]]    <= rd_tag[p];
        q_wdata[pslot[p]]  <= '0;
        q_write[pslot[p]]  <= 1'b0;
        q_nofill[pslot[p]] <= 1'b0;
      end
    if (sent_read) begin
      r_addr[r_tail]   <= q_addr[q_head];
      r_tag[r_tail]    <= q_tag[q_head];
      r_nofill[r_tail] <= sent_nofill;
    end
  end

  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                    mem_resp_valid |-> r_cnt != 0);
  a_queue_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                  32'(q_cnt) <= QDEPTH && 32'(r_cnt) <= QDEPTH);
endmodule
