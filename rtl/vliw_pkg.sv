// vliw_pkg: widths, slot numbering, instruction format and opcodes shared by
// the VLIW core.
//
// A bundle is six 32-bit words, one per functional unit, in a fixed slot
// order: two load units, two arithmetic units, one store unit and one branch
// unit. The six-word bundle and the unit mix follow the design description;
// the word width, register count, field layout and opcode values are this
// design's own choices, since none are published for it.
//
// Instruction word (every slot uses the same layout):
//   [31:28] op   unit-specific opcode, 0 = no operation
//   [27:23] rd   destination register (store: the register stored)
//   [22:18] rs   first source register (base register for loads)
//   [17:13] rt   second source register (register forms only)
//   [17:0]  imm  18-bit signed immediate (immediate forms and loads)
package vliw_pkg;

  localparam int unsigned XLEN    = 32;
  localparam int unsigned NREGS   = 32;
  localparam int unsigned RAW     = $clog2(NREGS);
  localparam int unsigned IMM_W   = 18;
  localparam int unsigned NSLOTS  = 6;

  // Slot positions inside a bundle.
  localparam int unsigned SLOT_LD0 = 0;
  localparam int unsigned SLOT_LD1 = 1;
  localparam int unsigned SLOT_AR0 = 2;
  localparam int unsigned SLOT_AR1 = 3;
  localparam int unsigned SLOT_ST  = 4;
  localparam int unsigned SLOT_BR  = 5;

  // Register-file port budget: nine read ports and five write ports.
  // Read ports 0..5 serve the two load and two arithmetic units, 6..8 the
  // store (base, data) and branch units. Write ports 0..3 serve the load and
  // arithmetic units, port 4 the loads returning from a data-cache miss.
  localparam int unsigned RF_NREAD  = 9;
  localparam int unsigned RF_NWRITE = 5;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RAW-1:0]  reg_t;

  typedef struct packed {
    logic [3:0]  op;
    reg_t        rd;
    reg_t        rs;
    reg_t        rt;
    logic [12:0] lo;
  } instr_t;

  // Load unit opcodes.
  typedef enum logic [3:0] {
    LD_NOP = 4'h0,
    LD_LW  = 4'h1
  } ld_op_e;

  // Store unit opcodes. A store writes register rd (a source here) to
  // address rs + imm.
  typedef enum logic [3:0] {
    ST_NOP = 4'h0,
    ST_SW  = 4'h1
  } st_op_e;

  // Branch unit opcodes. The target is the branch bundle's address + imm,
  // in bundles; the condition tests register rs.
  typedef enum logic [3:0] {
    BR_NOP  = 4'h0,
    BR_J    = 4'h1,
    BR_BEQZ = 4'h2,
    BR_BNEZ = 4'h3
  } br_op_e;

  // Arithmetic unit opcodes. Bit 3 selects the immediate operand.
  typedef enum logic [3:0] {
    AR_NOP  = 4'h0,
    AR_ADD  = 4'h1,
    AR_SUB  = 4'h2,
    AR_SLL  = 4'h3,
    AR_SRL  = 4'h4,
    AR_SRA  = 4'h5,
    AR_ADDI = 4'h9,
    AR_SUBI = 4'hA,
    AR_SLLI = 4'hB,
    AR_SRLI = 4'hC,
    AR_SRAI = 4'hD
  } ar_op_e;

  typedef enum logic {
    ALU_ADD = 1'b0,
    ALU_SUB = 1'b1
  } alu_op_e;

  typedef enum logic [1:0] {
    SH_LL = 2'd0,
    SH_RL = 2'd1,
    SH_RA = 2'd2
  } sh_op_e;

  // The 18-bit immediate of an instruction word.
  function automatic logic [IMM_W-1:0] imm_field(input instr_t i);
    return {i.rt, i.lo};
  endfunction

  // True for the arithmetic opcodes this design defines.
  function automatic logic ar_op_legal(input logic [3:0] op);
    case (op)
      AR_ADD, AR_SUB, AR_SLL, AR_SRL, AR_SRA,
      AR_ADDI, AR_SUBI, AR_SLLI, AR_SRLI, AR_SRAI: return 1'b1;
      default:                                     return 1'b0;
    endcase
  endfunction

endpackage
