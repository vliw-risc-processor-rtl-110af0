// sdram_model: behavioural model of the external synchronous DRAM behind the
// data cache (test benches only).
//
// A pipeline of LAT stages: it accepts one request per cycle while hold is
// low. A read returns its word LAT cycles later, in request order, so after
// the first access a word can come back every cycle; a write has no answer.
// Requests take effect in the order accepted: a read sees every write
// accepted before it. A word never written reads as
// mem_word(a) = (a * 0x9E3779B1) ^ 0x5A5A1234, which test benches recompute
// on their own; written words are kept in an associative array that test
// benches may inspect (peek).
module sdram_model #(
  parameter int unsigned LAT = 4,
  parameter int unsigned W   = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         hold,
  input  logic         req_valid,
  input  logic         req_write,
  input  logic [W-1:0] req_addr,
  input  logic [W-1:0] req_wdata,
  output logic         req_ready,
  output logic         resp_valid,
  output logic [W-1:0] resp_data
);
  logic         v [LAT];
  logic [W-1:0] d [LAT];
  logic [W-1:0] written [logic [W-1:0]];

  function automatic logic [W-1:0] peek(input logic [W-1:0] a);
    return written.exists(a) ? written[a] : (a * 32'h9E37_79B1) ^ 32'h5A5A_1234;
  endfunction

  assign req_ready  = !hold;
  assign resp_valid = v[LAT-1];
  assign resp_data  = d[LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        v[i] <= 1'b0;
        d[i] <= '0;
      end
    end else begin
      v[0] <= req_valid && req_ready && !req_write;
      d[0] <= peek(req_addr);
      for (int i = 1; i < LAT; i++) begin
        v[i] <= v[i-1];
        d[i] <= d[i-1];
      end
    end
  end

  always @(posedge clk)
    if (rst_n && req_valid && req_ready && req_write) written[req_addr] = req_wdata;
endmodule
