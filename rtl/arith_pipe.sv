// arith_pipe: one arithmetic unit, ID - RF - ME - WB after the shared IF stage.
//
//  ID  decodes its slot word, sign-extends the immediate and asks the
//      reservation station whether its source and destination registers are
//      free; it issues when they are.
//  RF  reads rs and rt and picks the second operand: rt or the immediate.
//  ME  runs the ALU (add, subtract) and the shifter (left logical, right
//      logical, right arithmetic) side by side and selects one result.
//  WB  writes the result into the register file and frees the destination.
// Issue to write-back is four cycles and the pipe never stalls after issue,
// so one instruction can issue every cycle.
// Interface: decode-stage signals to the reservation station, two register
// read ports and one register write port.
// The stage order, the operand select in RF and the ALU / shifter / result
// select in ME follow the design's arithmetic-pipe diagram. Opcode values and
// the immediate forms are this design's own choices.
module arith_pipe
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
  output logic   id_rd_en,
  output reg_t   id_rd,
  input  logic   id_stall,
  output logic   id_issue,
  output logic   id_done,
  // RF
  output reg_t   rf_raddr_a,
  input  word_t  rf_rdata_a,
  output reg_t   rf_raddr_b,
  input  word_t  rf_rdata_b,
  // WB
  output logic   wb_en,
  output reg_t   wb_rd,
  output word_t  wb_data
);
  instr_t ins;
  logic   is_op, use_imm;
  word_t  id_imm;

  assign ins     = instr_t'(id_instr);
  assign is_op   = id_valid && ar_op_legal(ins.op);
  assign use_imm = ins.op[3];

  sign_ext #(.IN_W(IMM_W), .OUT_W(XLEN)) u_sign (.imm(imm_field(ins)), .ext(id_imm));

  assign id_rs_en = is_op;
  assign id_rs    = ins.rs;
  assign id_rt_en = is_op && !use_imm;
  assign id_rt    = ins.rt;
  assign id_rd_en = is_op;
  assign id_rd    = ins.rd;
  assign id_issue = is_op && !id_stall;
  assign id_done  = id_valid && (!is_op || id_issue);

  // RF stage
  logic       rf_valid, rf_imm_sel;
  logic [2:0] rf_fn;
  reg_t       rf_rs, rf_rt, rf_rd;
  word_t      rf_imm, rf_b;

  assign rf_raddr_a = rf_rs;
  assign rf_raddr_b = rf_rt;
  assign rf_b       = rf_imm_sel ? rf_imm : rf_rdata_b;

  // ME stage
  logic       me_valid;
  logic [2:0] me_fn;
  reg_t       me_rd;
  word_t      me_a, me_b, alu_y, sh_y, me_y;
  alu_op_e    alu_op;
  sh_op_e     sh_op;

  always_comb begin
    alu_op = (me_fn == 3'(AR_SUB)) ? ALU_SUB : ALU_ADD;
    unique case (me_fn)
      3'(AR_SRL): sh_op = SH_RL;
      3'(AR_SRA): sh_op = SH_RA;
      default:    sh_op = SH_LL;
    endcase
  end

  alu     #(.W(XLEN)) u_alu (.op(alu_op), .a(me_a), .b(me_b), .y(alu_y));
  shifter #(.W(XLEN)) u_sh  (.op(sh_op), .a(me_a), .amt(me_b[$clog2(XLEN)-1:0]), .y(sh_y));

  assign me_y = (me_fn == 3'(AR_ADD) || me_fn == 3'(AR_SUB)) ? alu_y : sh_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf_valid   <= 1'b0;
      rf_imm_sel <= 1'b0;
      rf_fn      <= '0;
      rf_rs      <= '0;
      rf_rt      <= '0;
      rf_rd      <= '0;
      rf_imm     <= '0;
      me_valid   <= 1'b0;
      me_fn      <= '0;
      me_rd      <= '0;
      me_a       <= '0;
      me_b       <= '0;
      wb_en      <= 1'b0;
      wb_rd      <= '0;
      wb_data    <= '0;
    end else begin
      rf_valid   <= id_issue;
      rf_imm_sel <= use_imm;
      rf_fn      <= ins.op[2:0];
      rf_rs      <= ins.rs;
      rf_rt      <= ins.rt;
      rf_rd      <= ins.rd;
      rf_imm     <= id_imm;
      me_valid   <= rf_valid;
      me_fn      <= rf_fn;
      me_rd      <= rf_rd;
      me_a       <= rf_rdata_a;
      me_b       <= rf_b;
      wb_en      <= me_valid;
      wb_rd      <= me_rd;
      wb_data    <= me_y;
    end
  end
endmodule
