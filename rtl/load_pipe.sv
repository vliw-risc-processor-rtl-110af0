// load_pipe: one load unit, ID - RF - ME - WB after the IF stage shared by
// the whole bundle.
//
//  ID  decodes its slot word, sign-extends the offset and asks the reservation
//      station whether the base and destination registers are free. It issues
//      when they are and the pipe is not held by a cache miss.
//  RF  reads the base register and adds the offset (the address adder).
//  ME  looks the address up in the data cache, passing the destination
//      register as the request's tag.
//  WB  on a hit, writes the loaded word into the register file; the
//      reservation station frees the destination in the same cycle.
// A hit takes four cycles from issue to write-back. A miss leaves the pipe at
// ME: the cache's miss queue takes it over and later writes the word through
// its own register-file port, and the destination stays busy until then, so
// the pipe goes on issuing loads (non-blocking). Only when the miss queue is
// full does the cache refuse the load; then ME, RF and ID of this unit hold.
// While RF is held, the address it computed in its first cycle there is kept,
// so a later write to the base register cannot change it.
// Interface: decode-stage signals to the reservation station, one register
// read port, one data-cache load port and one register write port.
// The stage order and contents follow the design's load-pipe diagram; the
// opcode values, the hand-over of misses and the address hold are this
// design's own choices.
module load_pipe
  import vliw_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // ID
  input  logic   id_valid,
  input  word_t  id_instr,
  output logic   id_rs_en,
  output reg_t   id_rs,
  output logic   id_rd_en,
  output reg_t   id_rd,
  input  logic   id_stall,
  output logic   id_issue,
  output logic   id_done,
  // RF
  output reg_t   rf_raddr,
  input  word_t  rf_rdata,
  // ME
  output logic   dc_valid,
  output word_t  dc_addr,
  output reg_t   dc_tag,
  input  logic   dc_hit,
  input  logic   dc_accept,
  input  word_t  dc_data,
  output logic   miss,
  output logic   queue_stall,
  // WB
  output logic   wb_en,
  output reg_t   wb_rd,
  output word_t  wb_data
);
  instr_t     ins;
  logic       is_load;
  word_t      id_imm;

  assign ins     = instr_t'(id_instr);
  assign is_load = id_valid && (ins.op == LD_LW);

  sign_ext #(.IN_W(IMM_W), .OUT_W(XLEN)) u_sign (.imm(imm_field(ins)), .ext(id_imm));

  // RF stage registers
  logic  rf_valid, rf_held;
  reg_t  rf_rs, rf_rd;
  word_t rf_imm, rf_addr_hold, rf_addr;
  // ME stage registers
  logic  me_valid;
  reg_t  me_rd;
  word_t me_addr;

  assign queue_stall = me_valid && !dc_accept;
  assign miss        = me_valid && dc_accept && !dc_hit;

  assign id_rs_en = is_load;
  assign id_rs    = ins.rs;
  assign id_rd_en = is_load;
  assign id_rd    = ins.rd;
  assign id_issue = is_load && !id_stall && !queue_stall;
  // a no-op slot is consumed at once
  assign id_done  = id_valid && (!is_load || id_issue);

  assign rf_raddr = rf_rs;
  assign rf_addr  = rf_held ? rf_addr_hold : rf_rdata + rf_imm;

  assign dc_valid = me_valid;
  assign dc_addr  = me_addr;
  assign dc_tag   = me_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf_valid     <= 1'b0;
      rf_held      <= 1'b0;
      rf_rs        <= '0;
      rf_rd        <= '0;
      rf_imm       <= '0;
      rf_addr_hold <= '0;
      me_valid     <= 1'b0;
      me_rd        <= '0;
      me_addr      <= '0;
      wb_en        <= 1'b0;
      wb_rd        <= '0;
      wb_data      <= '0;
    end else begin
      // WB
      wb_en   <= me_valid && dc_hit;
      wb_rd   <= me_rd;
      wb_data <= dc_data;
      if (queue_stall) begin
        // hold ME and RF; freeze the computed address once
        if (rf_valid && !rf_held) begin
          rf_held      <= 1'b1;
          rf_addr_hold <= rf_addr;
        end
      end else begin
        me_valid <= rf_valid;
        me_rd    <= rf_rd;
        me_addr  <= rf_addr;
        rf_valid <= id_issue;
        rf_held  <= 1'b0;
        rf_rs    <= ins.rs;
        rf_rd    <= ins.rd;
        rf_imm   <= id_imm;
      end
    end
  end

  a_no_issue_on_miss: assert property (@(posedge clk) disable iff (!rst_n)
                                       queue_stall |-> !id_issue);
endmodule
