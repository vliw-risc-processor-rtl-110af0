// regfile: multi-ported register file, nine read ports and five write ports.
//
// Every unit of the VLIW core reaches the registers directly, so the file has
// a read port for each source operand (two load bases, four arithmetic
// operands, store base and data, branch operand) and a write port for each
// source of results (two loads, two arithmetic, and the data cache returning
// a missed load).
// Reads are combinational. Writes take effect at the rising clock edge; if two
// ports write the same register in one cycle, the higher-numbered port wins.
// All registers clear on reset.
// The port counts follow the design description. Register count, width, the
// write-priority rule and reset are this design's own choices. The source
// design builds this array as a custom full-custom cell array with sense
// amplifiers; here it is plain flip-flops.
module regfile #(
  parameter int unsigned NREGS  = 32,
  parameter int unsigned W      = 32,
  parameter int unsigned NREAD  = 9,
  parameter int unsigned NWRITE = 5,
  localparam int unsigned AW    = $clog2(NREGS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [AW-1:0]       raddr [NREAD],
  output logic [W-1:0]        rdata [NREAD],
  input  logic                we    [NWRITE],
  input  logic [AW-1:0]       waddr [NWRITE],
  input  logic [W-1:0]        wdata [NWRITE]
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < NWRITE; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb
    for (int p = 0; p < NREAD; p++) rdata[p] = regs[raddr[p]];
endmodule
