// tb_icache: the instruction cache against a small instruction memory model.
//
// The memory answers each word request LAT cycles later, in order; its
// contents are random. The test fetches random bundle addresses from a range
// three times the cache size, so lines conflict. Each fetch holds rd_en until
// rd_hit. A reference copy of the tags predicts whether the first try hits.
// With the memory always ready (first half), a miss must take exactly
// NSLOTS + LAT + 1 cycles to turn into a hit. After each fetch the output
// register must hold the bundle, and it must keep it for a cycle with rd_en
// low and a different address. In the second half the memory refuses
// requests at random, and only data and hit prediction are checked. Every
// word request must carry the right {bundle, slot} address.
module tb_icache;
  localparam int LINES = 16, NS = 6, PCW = 8, LAT = 2, SPAN = 3 * LINES;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic            rd_en = 0;
  logic [PCW-1:0]  rd_addr = 0;
  logic            rd_hit, refilling;
  logic [31:0]     rd_bundle [NS];
  logic            mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [PCW+2:0]  mem_req_addr;
  logic [31:0]     mem_resp_data;
  logic [31:0]     img [SPAN][NS];
  logic            busy = 0;
  int              ref_tag [LINES];

  icache #(.LINES(LINES), .NSLOTS(NS), .W(32), .PCW(PCW)) dut (.*);

  always #5 clk = ~clk;

  // instruction memory model
  logic        mv [LAT];
  logic [31:0] md [LAT];
  assign mem_req_ready  = !busy;
  assign mem_resp_valid = mv[LAT-1];
  assign mem_resp_data  = md[LAT-1];
  always @(posedge clk) begin
    if (!rst_n) for (int i = 1; i < LAT; i++) mv[i] <= 1'b0;
    else        for (int i = 1; i < LAT; i++) mv[i] <= mv[i-1];
    for (int i = 1; i < LAT; i++) md[i] <= md[i-1];
    mv[0] <= rst_n && mem_req_valid && mem_req_ready;
    md[0] <= (int'(mem_req_addr[PCW+2:3]) < SPAN && int'(mem_req_addr[2:0]) < NS)
             ? img[mem_req_addr[PCW+2:3]][mem_req_addr[2:0]] : 32'hDEAD_BEEF;
  end

  // request addresses: NS words of the refilled bundle, slots in order
  int exp_slot = 0;
  logic [PCW-1:0] exp_bundle;
  always @(posedge clk) if (rst_n && mem_req_valid && mem_req_ready) begin
    checks++;
    if (mem_req_addr !== {exp_bundle, 3'(exp_slot)}) begin
      failures++; $display("FAIL request %h, exp bundle %0d slot %0d", mem_req_addr, exp_bundle, exp_slot);
    end
    exp_slot = (exp_slot + 1) % NS;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input int a, string what);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (rd_bundle[s] !== img[a][s]) begin
        failures++;
        $display("FAIL %s bundle %0d slot %0d: %h exp %h", what, a, s, rd_bundle[s], img[a][s]);
      end
    end
  endtask

  int n_hit = 0, n_miss = 0;

  initial begin
    for (int a = 0; a < SPAN; a++)
      for (int s = 0; s < NS; s++) img[a][s] = $urandom();
    for (int l = 0; l < LINES; l++) ref_tag[l] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (rd_hit || refilling) begin failures++; $display("FAIL hit or refill after reset"); end
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (rd_bundle[s] !== 0) begin failures++; $display("FAIL reset slot %0d", s); end
    end
    for (int n = 0; n < 600; n++) begin
      int a, cyc;
      bit exp_hit;
      a = $urandom_range(0, SPAN - 1);
      exp_hit = ref_tag[a % LINES] == a / LINES;
      rd_en = 1; rd_addr = PCW'(a); exp_bundle = PCW'(a); exp_slot = 0;
      #1;
      checks++;
      if (rd_hit !== exp_hit) begin
        failures++; $display("FAIL bundle %0d hit %0d exp %0d", a, rd_hit, exp_hit);
      end
      if (exp_hit) n_hit++; else n_miss++;
      cyc = 0;
      while (!rd_hit) begin
        @(negedge clk); busy = (n >= 300) && ($urandom_range(0, 2) == 0);
        #1; cyc++;
      end
      if (n < 300 && !exp_hit) begin
        checks++;
        if (cyc != NS + LAT + 1) begin
          failures++; $display("FAIL miss took %0d cycles, exp %0d", cyc, NS + LAT + 1);
        end
      end
      ref_tag[a % LINES] = a / LINES;
      @(negedge clk);
      cmp(a, "read");
      rd_en = 0; rd_addr = PCW'(a ^ 1);
      @(negedge clk);
      cmp(a, "hold");
    end
    checks++;
    if (n_hit == 0 || n_miss == 0) begin failures++; $display("FAIL hits %0d misses %0d", n_hit, n_miss); end
    $display("hits=%0d misses=%0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
