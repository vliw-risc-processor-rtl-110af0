// branch_unit: the branch unit, ID - RF, computing the next program counter.
//
//  ID  decodes its slot word and, for a conditional branch, asks the
//      reservation station whether rs is free; it issues when that holds and
//      id_stall is low (the core also holds it until every other slot of the
//      bundle issues, so the branch leaves decode together with its bundle).
//  RF  reads rs and decides: J is always taken, BEQZ when rs is zero, BNEZ
//      when it is not. The target is the branch bundle's own address plus
//      the sign-extended offset, in bundles. A taken branch raises redirect
//      for that one cycle with the target.
// Because the decision is made in RF, the bundle after the branch has already
// been fetched and always executes (one delay slot); fetching resumes at the
// target after it.
// Interface: decode-stage signals to the reservation station, the bundle
// address id_pc, one register read port, and redirect/target to the fetch
// logic.
// Calculating the program counter is the unit's function in the design
// description; the source does not give its insides, so the conditions, the
// relative target and the delay slot are this design's own choices.
module branch_unit
  import vliw_pkg::*;
#(
  parameter int unsigned PCW = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  // ID
  input  logic           id_valid,
  input  word_t          id_instr,
  input  logic [PCW-1:0] id_pc,
  output logic           id_rs_en,
  output reg_t           id_rs,
  input  logic           id_stall,
  output logic           id_issue,
  output logic           id_done,
  // RF
  output reg_t           rf_raddr,
  input  word_t          rf_rdata,
  output logic           redirect,
  output logic [PCW-1:0] target
);
  instr_t ins;
  logic   is_br;
  word_t  id_imm;

  assign ins   = instr_t'(id_instr);
  assign is_br = id_valid && (ins.op == BR_J || ins.op == BR_BEQZ || ins.op == BR_BNEZ);

  sign_ext #(.IN_W(IMM_W), .OUT_W(XLEN)) u_sign (.imm(imm_field(ins)), .ext(id_imm));

  assign id_rs_en = is_br && (ins.op != BR_J);
  assign id_rs    = ins.rs;
  assign id_issue = is_br && !id_stall;
  assign id_done  = id_valid && (!is_br || id_issue);

  logic           rf_valid;
  logic [3:0]     rf_op;
  reg_t           rf_rs;
  logic [PCW-1:0] rf_target;

  assign rf_raddr = rf_rs;
  assign target   = rf_target;
  always_comb begin
    unique case (rf_op)
      BR_J:    redirect = rf_valid;
      BR_BEQZ: redirect = rf_valid && (rf_rdata == '0);
      BR_BNEZ: redirect = rf_valid && (rf_rdata != '0);
      default: redirect = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf_valid  <= 1'b0;
      rf_op     <= '0;
      rf_rs     <= '0;
      rf_target <= '0;
    end else begin
      rf_valid  <= id_issue;
      rf_op     <= ins.op;
      rf_rs     <= ins.rs;
      rf_target <= id_pc + id_imm[PCW-1:0];
    end
  end
endmodule
