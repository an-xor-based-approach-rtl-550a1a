// irf_pkg: types and constants shared by the instruction register file (IRF)
// stage.
//
// An IRF entry holds a 36-bit "code": a MIPS32 instruction plus four flags
// S, T, D and I. A set flag means that the rs, rt, rd or imm[4:0] field of
// the stored instruction is XORed with a 5-bit parameter when the entry is
// read, so one entry stands for a group of up to 32 similar instructions.
// The flags sit in bits 35..32 in the order S, T, D, I (this layout is a
// choice of this design; the field meanings follow the XOR merging scheme).
//
// The package also fixes the encodings of the packed instruction words:
// the T-type (tightly packed) opcodes and variant numbering, and the
// opcode sets that carry a loosely packed IRF reference. Those encodings
// are this design's own choices; the field positions follow the packed
// formats of the IRF instruction set.
package irf_pkg;

  localparam int unsigned INST_W  = 32;
  localparam int unsigned IDX_W   = 5;   // IRF index and parameter width
  localparam int unsigned CODE_W  = 36;  // 4 flags + 32-bit instruction
  localparam int unsigned IRF_ENTRIES = 32;
  localparam int unsigned MAX_SLOTS = 5; // most instructions one word carries

  typedef logic [IDX_W-1:0]  idx_t;
  typedef logic [INST_W-1:0] inst_t;

  // Flags of an IRF code: which fields are XORed with the parameter.
  typedef struct packed {
    logic s;  // rs    (bits 25:21)
    logic t;  // rt    (bits 20:16)
    logic d;  // rd    (bits 15:11)
    logic i;  // imm   (bits  4:0)
  } irf_flags_t;

  typedef struct packed {
    irf_flags_t flags;
    inst_t      inst;
  } irf_code_t;

  // The nop (sll r0,r0,0) with no flags; entry 0 always holds it.
  localparam irf_code_t NOP_CODE = '0;

  // T-type: primary opcodes 0x18..0x1B; variant = {opcode[1:0], S}.
  localparam logic [5:0] TTYPE_OPC_BASE = 6'h18;

  typedef enum logic [2:0] {
    T_TIGHT5   = 3'd0,
    T_PARAM4_A = 3'd1,
    T_PARAM4_B = 3'd2,
    T_PARAM4_C = 3'd3,
    T_PARAM4_D = 3'd4,
    T_PARAM3_AB = 3'd5,
    T_PARAM3_AC = 3'd6,
    T_PARAM3_BC = 3'd7
  } ttype_variant_t;

  // What a fetched word is.
  typedef enum logic [1:0] {
    W_REGULAR = 2'd0,  // plain instruction, passed unchanged
    W_LOOSE_R = 2'd1,  // R-type with an IRF index in the shamt field
    W_LOOSE_I = 2'd2,  // I-type with an IRF index in imm[4:0]
    W_TIGHT   = 2'd3   // T-type, up to five IRF references
  } word_kind_t;

  // One instruction carried by a fetched word.
  typedef struct packed {
    logic is_irf;  // 0: the word's regular instruction, 1: IRF reference
    idx_t idx;     // IRF index
    idx_t param;   // parameter, 0 for a default (parameter-free) reference
  } slot_t;

  // MIPS opcode and funct values used to recognise formats.
  localparam logic [5:0] OPC_SPECIAL = 6'h00;
  localparam logic [5:0] OPC_REGIMM  = 6'h01;
  localparam logic [5:0] FN_SLL = 6'h00;
  localparam logic [5:0] FN_SRL = 6'h02;
  localparam logic [5:0] FN_SRA = 6'h03;

  // Loosely packed I-type opcodes: REGIMM, branches and ALU immediates
  // (0x04..0x0F), loads and stores (0x20..0x2E).
  function automatic logic is_loose_itype(logic [5:0] opc);
    return (opc == OPC_REGIMM) ||
           (opc >= 6'h04 && opc <= 6'h0F) ||
           (opc >= 6'h20 && opc <= 6'h2E);
  endfunction

  // andi, ori, xori and lui take a zero-extended immediate.
  function automatic logic is_zext_imm(logic [5:0] opc);
    return opc >= 6'h0C && opc <= 6'h0F;
  endfunction

  // takes opcode bits 5:2; bits 1:0 are part of the variant number
  function automatic logic is_ttype(logic [3:0] opc_hi);
    return opc_hi == TTYPE_OPC_BASE[5:2];
  endfunction

endpackage
