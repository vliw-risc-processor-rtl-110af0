// store_pipe: the store unit, ID - RF - ME after the shared IF stage.
//
//  ID  decodes its slot word (base rs, stored register rd, offset imm),
//      sign-extends the offset and asks the reservation station whether both
//      source registers are free; it issues when they are and the pipe is not
//      held.
//  RF  reads the base and the data register and adds the offset.
//  ME  hands address and data to the data cache's store port. A store writes
//      no register, so it has no WB stage and frees nothing.
// If the cache refuses the store (full request queue), ME, RF and ID hold;
// the RF stage keeps the address and data it read in its first cycle there,
// so later writes to those registers cannot change the store.
// Interface: decode-stage signals to the reservation station, two register
// read ports and the data-cache store port.
// Storing register values into the data cache is the unit's function in the
// design description; the source does not give the unit's insides, so its
// stages mirror the load pipe, and its encoding is this design's own.
module store_pipe
  import vliw_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // ID
  input  logic   id_valid,
  input  word_t  id_instr,
  output logic   id_rs_en,
  output reg_t   id_rs,
  output logic   id_rt_en,
  output reg_t   id_rt,
  input  logic   id_stall,
  output logic   id_issue,
  output logic   id_done,
  // RF
  output reg_t   rf_raddr_a,
  input  word_t  rf_rdata_a,
  output reg_t   rf_raddr_b,
  input  word_t  rf_rdata_b,
  // ME
  output logic   st_valid,
  output word_t  st_addr,
  output word_t  st_data,
  input  logic   st_accept,
  output logic   queue_stall
);
  instr_t ins;
  logic   is_store;
  word_t  id_imm;

  assign ins      = instr_t'(id_instr);
  assign is_store = id_valid && (ins.op == ST_SW);

  sign_ext #(.IN_W(IMM_W), .OUT_W(XLEN)) u_sign (.imm(imm_field(ins)), .ext(id_imm));

  logic  rf_valid, rf_held;
  reg_t  rf_rs, rf_rd;
  word_t rf_imm, rf_addr, rf_data, rf_addr_hold, rf_data_hold;
  logic  me_valid;
  word_t me_addr, me_data;

  assign queue_stall = me_valid && !st_accept;

  assign id_rs_en = is_store;
  assign id_rs    = ins.rs;
  assign id_rt_en = is_store;
  assign id_rt    = ins.rd;
  assign id_issue = is_store && !id_stall && !queue_stall;
  assign id_done  = id_valid && (!is_store || id_issue);

  assign rf_raddr_a = rf_rs;
  assign rf_raddr_b = rf_rd;
  assign rf_addr    = rf_held ? rf_addr_hold : rf_rdata_a + rf_imm;
  assign rf_data    = rf_held ? rf_data_hold : rf_rdata_b;

  assign st_valid = me_valid;
  assign st_addr  = me_addr;
  assign st_data  = me_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf_valid     <= 1'b0;
      rf_held      <= 1'b0;
      rf_rs        <= '0;
      rf_rd        <= '0;
      rf_imm       <= '0;
      rf_addr_hold <= '0;
      rf_data_hold <= '0;
      me_valid     <= 1'b0;
      me_addr      <= '0;
      me_data      <= '0;
    end else if (queue_stall) begin
      if (rf_valid && !rf_held) begin
        rf_held      <= 1'b1;
        rf_addr_hold <= rf_addr;
        rf_data_hold <= rf_data;
      end
    end else begin
      me_valid <= rf_valid;
      me_addr  <= rf_addr;
      me_data  <= rf_data;
      rf_valid <= id_issue;
      rf_held  <= 1'b0;
      rf_rs    <= ins.rs;
      rf_rd    <= ins.rd;
      rf_imm   <= id_imm;
    end
  end

  a_no_issue_when_held: assert property (@(posedge clk) disable iff (!rst_n)
                                         queue_stall |-> !id_issue);
endmodule
