// tb_res_station: directed hazard cases (read-after-write, write-after-write,
// same-cycle write-back, independent units) and random issue / write-back
// traffic checked against a reference busy table.
module tb_res_station;
  localparam int NU = 4, NWB = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic       chk_rs_en [NU], chk_rt_en [NU], chk_rd_en [NU];
  logic [4:0] chk_rs [NU], chk_rt [NU], chk_rd [NU];
  logic       stall [NU], issue [NU], wb_en [NWB];
  logic [4:0] wb_rd [NWB];
  logic [31:0] busy_o;
  bit          ref_busy [32];

  res_station #(.NUNITS(NU), .NWB(NWB), .NREGS(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    for (int u = 0; u < NU; u++) begin
      chk_rs_en[u] = 0; chk_rt_en[u] = 0; chk_rd_en[u] = 0;
      chk_rs[u] = 0; chk_rt[u] = 0; chk_rd[u] = 0;
      issue[u] = 0;
    end
    for (int w = 0; w < NWB; w++) begin wb_en[w] = 0; wb_rd[w] = 0; end
  endtask

  task automatic expect_stall(int u, bit e, string what);
    #1;
    checks++;
    if (stall[u] !== e) begin
      failures++;
      $display("FAIL %s: unit %0d stall=%0d exp %0d", what, u, stall[u], e);
    end
  endtask

  // Reference: stall when a named register is busy and not written back now.
  function automatic bit ref_stall(int u);
    bit fr [32];
    for (int r = 0; r < 32; r++) fr[r] = !ref_busy[r];
    for (int w = 0; w < NWB; w++) if (wb_en[w]) fr[wb_rd[w]] = 1;
    return (chk_rs_en[u] && !fr[chk_rs[u]]) || (chk_rt_en[u] && !fr[chk_rt[u]]) ||
           (chk_rd_en[u] && !fr[chk_rd[u]]);
  endfunction

  initial begin
    idle();
    for (int r = 0; r < 32; r++) ref_busy[r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // unit 0 issues a write of r5
    @(negedge clk);
    chk_rd_en[0] = 1; chk_rd[0] = 5; chk_rs_en[0] = 1; chk_rs[0] = 1;
    expect_stall(0, 0, "free issue");
    issue[0] = 1;
    @(negedge clk);
    idle();
    // unit 1 reads r5: RAW stall
    chk_rs_en[1] = 1; chk_rs[1] = 5; chk_rd_en[1] = 1; chk_rd[1] = 6;
    expect_stall(1, 1, "RAW on rs");
    chk_rs[1] = 7; chk_rt_en[1] = 1; chk_rt[1] = 5;
    expect_stall(1, 1, "RAW on rt");
    // unit 2 writes r5: WAW stall
    chk_rd_en[2] = 1; chk_rd[2] = 5;
    expect_stall(2, 1, "WAW");
    // unit 3 independent
    chk_rs_en[3] = 1; chk_rs[3] = 8; chk_rd_en[3] = 1; chk_rd[3] = 9;
    expect_stall(3, 0, "independent unit");
    // write-back of r5 this cycle frees it for checking at once
    wb_en[4] = 1; wb_rd[4] = 5;
    expect_stall(1, 0, "same-cycle write-back");
    @(negedge clk);
    idle();
    chk_rs_en[1] = 1; chk_rs[1] = 5;
    expect_stall(1, 0, "after write-back");
    checks++;
    if (busy_o !== 32'h0) begin
      failures++;
      $display("FAIL busy not clear: %h", busy_o);
    end
    @(negedge clk);
    idle();

    // random traffic
    for (int n = 0; n < 3000; n++) begin
      bit wbused [32];
      for (int r = 0; r < 32; r++) wbused[r] = 0;
      for (int u = 0; u < NU; u++) begin
        chk_rs_en[u] = $urandom_range(0, 1);
        chk_rt_en[u] = $urandom_range(0, 1);
        chk_rd_en[u] = $urandom_range(0, 3) != 0;
        chk_rs[u] = 5'($urandom_range(0, 15));
        chk_rt[u] = 5'($urandom_range(0, 15));
        chk_rd[u] = 5'($urandom_range(0, 15));
      end
      // write back some busy registers
      for (int w = 0; w < NWB; w++) begin
        int r = $urandom_range(0, 15);
        wb_en[w] = 0;
        if (ref_busy[r] && !wbused[r] && $urandom_range(0, 2) == 0) begin
          wb_en[w] = 1; wb_rd[w] = 5'(r); wbused[r] = 1;
        end
      end
      #1;
      for (int u = 0; u < NU; u++) begin
        checks++;
        if (stall[u] !== ref_stall(u)) begin
          failures++;
          $display("FAIL random n=%0d unit %0d stall=%0d", n, u, stall[u]);
        end
      end
      // issue the non-stalled units whose destinations differ
      for (int u = 0; u < NU; u++) begin
        bit clash = 0;
        for (int v = 0; v < u; v++)
          if (issue[v] && chk_rd_en[v] && chk_rd_en[u] && chk_rd[v] == chk_rd[u]) clash = 1;
        issue[u] = !stall[u] && !clash;
      end
      @(posedge clk);
      for (int w = 0; w < NWB; w++) if (wb_en[w]) ref_busy[wb_rd[w]] = 0;
      for (int u = 0; u < NU; u++) if (issue[u] && chk_rd_en[u]) ref_busy[chk_rd[u]] = 1;
      @(negedge clk);
      checks++;
      for (int r = 0; r < 32; r++)
        if (busy_o[r] !== ref_busy[r]) begin
          failures++;
          $display("FAIL busy r%0d=%0d", r, busy_o[r]);
          break;
        end
      for (int u = 0; u < NU; u++) issue[u] = 0;
      for (int w = 0; w < NWB; w++) wb_en[w] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
