// tb_dcache: the data cache with the behavioural SDRAM behind it.
// Phase 1 times a cold miss (SDRAM latency + 1 cycle from the miss to the
// returning word) and checks the word is then resident. Phase 1b sends
// eight misses on consecutive cycles: none may be refused, and after the
// first word the SDRAM pipeline must return one word per cycle. Phase 2 offers
// random loads on both ports and random stores every cycle over a small
// address range, so lines conflict. A reference memory is updated in order
// (this cycle's store before this cycle's loads). Hits are checked at once;
// each accepted miss is recorded with a unique tag and the value the
// reference holds at that moment, and the returning words must come back in
// miss order with the right tag and that value. A refused store must refuse
// the loads with it. Hits under outstanding misses, a full queue, SDRAM
// back-pressure and stores that overtake an outstanding miss to their address
// are counted and must occur; at the end the SDRAM must hold every store.
module tb_dcache;
  localparam int LAT = 4, Q = 4, LINES = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic        rd_valid  [2];
  logic [31:0] rd_addr   [2];
  logic [4:0]  rd_tag    [2];
  logic        rd_hit    [2], rd_accept [2];
  logic [31:0] rd_data   [2];
  logic        fill_valid;
  logic [4:0]  fill_tag;
  logic [31:0] fill_data;
  logic        st_valid = 0, st_accept;
  logic [31:0] st_addr = 0, st_data = 0;
  logic        mem_req_valid, mem_req_write, mem_req_ready, mem_resp_valid;
  logic [31:0] mem_req_addr, mem_req_wdata, mem_resp_data;
  logic [3:0]  miss_count;
  logic        miss_queue_full;
  logic        hold = 0;
  int n_hit_under_miss = 0, n_refused = 0, n_hold = 0, n_hits = 0, n_fills = 0;
  int n_stores = 0, n_overtake = 0, n_st_refused = 0;
  logic [31:0] ref_mem [logic [31:0]];
  logic [31:0] exp_val  [$];
  logic [31:0] exp_addr [$];
  logic [4:0]  exp_tag  [$];
  logic [4:0]  next_tag = 0;

  dcache #(.LINES(LINES), .W(32), .AW(32), .TW(5), .NPORTS(2), .QDEPTH(Q)) dut (.*);
  sdram_model #(.LAT(LAT), .W(32)) mem (
    .clk, .rst_n, .hold, .req_valid(mem_req_valid), .req_write(mem_req_write),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .req_ready(mem_req_ready), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data)
  );

  always #5 clk = ~clk;

  function automatic logic [31:0] mem_word(input logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_1234;
  endfunction

  function automatic logic [31:0] ref_read(input logic [31:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : mem_word(a);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Arrival cycles of the returning words of the miss stream (phase 1b).
  logic stream_on = 0;
  int stream_fills = 0, stream_first = 0, stream_last = 0, n_stream_refused = 0, cyc_now = 0;
  always @(posedge clk) begin
    cyc_now <= cyc_now + 1;
    if (stream_on && fill_valid) begin
      if (stream_fills == 0) stream_first <= cyc_now;
      stream_last  <= cyc_now;
      stream_fills <= stream_fills + 1;
    end
  end

  // Returning words: in miss order, right tag, right data.
  always @(posedge clk) if (rst_n && fill_valid) begin
    checks++;
    n_fills++;
    if (exp_addr.size() == 0) begin
      failures++; $display("FAIL unexpected fill");
    end else begin
      logic [31:0] a, v;
      logic [4:0]  t;
      a = exp_addr.pop_front();
      t = exp_tag.pop_front();
      v = exp_val.pop_front();
      if (fill_tag !== t || fill_data !== v) begin
        failures++;
        $display("FAIL fill tag %0d data %h, exp tag %0d addr %0d", fill_tag, fill_data, t, a);
      end
    end
  end

  initial begin
    rd_valid[0] = 0; rd_valid[1] = 0; rd_addr[0] = 0; rd_addr[1] = 0;
    rd_tag[0] = 0; rd_tag[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Phase 1: cold miss latency
    @(negedge clk);
    rd_valid[0] = 1; rd_addr[0] = 32'h123; rd_tag[0] = next_tag;
    #1;
    checks++;
    if (rd_hit[0] || !rd_accept[0]) begin failures++; $display("FAIL cold access not a miss"); end
    exp_addr.push_back(32'h123); exp_tag.push_back(next_tag); exp_val.push_back(mem_word(32'h123));
    next_tag++;
    @(negedge clk);
    rd_valid[0] = 0;
    begin
      int cyc = 1;
      while (!fill_valid) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != LAT + 1) begin
        failures++;
        $display("FAIL cold miss took %0d cycles, exp %0d", cyc, LAT + 1);
      end
    end
    @(negedge clk);
    rd_valid[0] = 1; rd_addr[0] = 32'h123;
    #1;
    checks++;
    if (!rd_hit[0] || rd_data[0] !== mem_word(32'h123)) begin
      failures++; $display("FAIL word not resident after fill");
    end
    rd_valid[0] = 0;

    // Phase 1b: a stream of misses, one per cycle; after the first word the
    // SDRAM pipeline must return one word every cycle.
    repeat (2) @(negedge clk);
    stream_on = 1;
    for (int n = 0; n < 8; ) begin
      rd_valid[0] = 1; rd_addr[0] = 32'h200 + 32'(n); rd_tag[0] = next_tag;
      #1;
      if (rd_accept[0]) begin
        exp_addr.push_back(rd_addr[0]); exp_tag.push_back(next_tag);
        exp_val.push_back(mem_word(rd_addr[0]));
        next_tag++; n++;
      end else n_stream_refused++;
      @(negedge clk);
    end
    rd_valid[0] = 0;
    repeat (LAT + 4) @(negedge clk);
    stream_on = 0;
    checks++;
    if (stream_fills != 8 || stream_last - stream_first != 7 || n_stream_refused != 0) begin
      failures++;
      $display("FAIL miss stream: %0d words over %0d cycles, %0d refused", stream_fills,
               stream_last - stream_first + 1, n_stream_refused);
    end

    // Phase 2: both ports, random addresses, a new load whenever accepted
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      hold = ($urandom_range(0, 9) == 0);
      if (!(st_valid && !st_accept)) begin
        st_valid = ($urandom_range(0, 3) == 0);
        st_addr  = 32'($urandom_range(0, 47));
        st_data  = $urandom();
      end
      for (int p = 0; p < 2; p++) begin
        // a refused load is offered again unchanged
        if (!(rd_valid[p] && !rd_accept[p])) begin
          rd_valid[p] = ($urandom_range(0, 3) != 0);
          rd_addr[p]  = 32'($urandom_range(0, 47));
        end
      end
      #1;
      if (hold && mem_req_valid) n_hold++;
      if (st_valid) begin
        if (st_accept) begin
          n_stores++;
          foreach (exp_addr[i]) if (exp_addr[i] == st_addr) begin n_overtake++; break; end
          ref_mem[st_addr] = st_data;
        end else begin
          n_st_refused++;
          for (int p = 0; p < 2; p++) begin
            checks++;
            if (rd_valid[p] && rd_accept[p]) begin
              failures++; $display("FAIL load accepted beside a refused store");
            end
          end
        end
      end
      for (int p = 0; p < 2; p++) begin
        if (!rd_valid[p]) continue;
        if (!rd_accept[p]) begin n_refused++; continue; end
        if (rd_hit[p]) begin
          checks++;
          n_hits++;
          if (miss_count != 0) n_hit_under_miss++;
          if (rd_data[p] !== ref_read(rd_addr[p])) begin
            failures++;
            $display("FAIL hit port %0d addr %0d data %h", p, rd_addr[p], rd_data[p]);
          end
        end
      end
      // tags for this cycle's misses, in port order (port 0 queued first)
      for (int p = 0; p < 2; p++) begin
        rd_tag[p] = next_tag;
        if (rd_valid[p] && rd_accept[p] && !rd_hit[p]) begin
          exp_addr.push_back(rd_addr[p]); exp_tag.push_back(next_tag);
          exp_val.push_back(ref_read(rd_addr[p]));
          next_tag++;
        end
      end
    end
    @(negedge clk);
    while (st_valid && !st_accept) @(negedge clk);
    rd_valid[0] = 0; rd_valid[1] = 0; st_valid = 0; hold = 0;
    repeat (3 * LAT + 10) @(negedge clk);
    foreach (ref_mem[a]) begin
      checks++;
      if (mem.peek(a) !== ref_mem[a]) begin
        failures++; $display("FAIL SDRAM word %0d = %h exp %h", a, mem.peek(a), ref_mem[a]);
      end
    end
    checks++;
    if (exp_addr.size() != 0) begin failures++; $display("FAIL %0d misses never returned", exp_addr.size()); end
    $display("hits=%0d fills=%0d hit_under_miss=%0d refused=%0d backpressure=%0d stores=%0d st_refused=%0d overtakes=%0d",
             n_hits, n_fills, n_hit_under_miss, n_refused, n_hold, n_stores, n_st_refused, n_overtake);
    checks++; if (n_overtake == 0 || n_st_refused == 0) begin failures++; $display("FAIL store coverage"); end
    checks++; if (n_hit_under_miss == 0) begin failures++; $display("FAIL no hit under miss"); end
    checks++; if (n_refused == 0) begin failures++; $display("FAIL queue never full"); end
    checks++; if (n_hold == 0) begin failures++; $display("FAIL no back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
