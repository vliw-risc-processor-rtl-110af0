// tb_regfile: random traffic on all five write ports and nine read ports,
// including several ports writing one register in the same cycle, checked
// against a shadow copy in which the highest-numbered writer wins.
module tb_regfile;
  localparam int NR = 9, NW = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0]  raddr [NR];
  logic [31:0] rdata [NR];
  logic        we    [NW];
  logic [4:0]  waddr [NW];
  logic [31:0] wdata [NW];
  logic [31:0] shadow [32];

  regfile #(.NREGS(32), .W(32), .NREAD(NR), .NWRITE(NW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int p = 0; p < NR; p++) begin
      raddr[p] = 5'($urandom_range(0, 31));
    end
    #1;
    for (int p = 0; p < NR; p++) begin
      checks++;
      if (rdata[p] !== shadow[raddr[p]]) begin
        failures++;
        $display("FAIL port %0d r%0d = %h exp %h", p, raddr[p], rdata[p], shadow[raddr[p]]);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < NW; p++) begin
      we[p] = 0; waddr[p] = 0; wdata[p] = 0;
    end
    for (int p = 0; p < NR; p++) raddr[p] = 0;
    for (int r = 0; r < 32; r++) shadow[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_reads();          // all zero after reset
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        we[p]    = ($urandom_range(0, 2) != 0);
        // a narrow address range makes same-register writes frequent
        waddr[p] = (n % 4 == 0) ? 5'($urandom_range(0, 3)) : 5'($urandom_range(0, 31));
        wdata[p] = $urandom();
      end
      @(posedge clk);
      for (int p = 0; p < NW; p++)
        if (we[p]) shadow[waddr[p]] = wdata[p];
      @(negedge clk);
      for (int p = 0; p < NW; p++) we[p] = 0;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
