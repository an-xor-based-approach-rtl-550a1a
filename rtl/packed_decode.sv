// packed_decode: splits a fetched word into the instructions it carries.
//
// A fetched word is one of:
//   * a tightly packed T-type word: opcode 0x18..0x1B, five 5-bit fields
//     f1..f5 at 25:21, 20:16, 15:11, 10:6, 4:0 and the S bit at 5. The
//     variant {opcode[1:0], S} says which fields are IRF indexes and which
//     are parameters:
//       tight5      f1..f5 are indexes, no parameters
//       param4_X    f1..f4 are indexes, f5 is the parameter of index X
//                   (A = first .. D = fourth)
//       param3_XY   f1..f3 are indexes, f4 is the parameter of X and f5
//                   that of Y (A, B, C = first, second, third)
//   * a loosely packed R-type word (opcode 0): the shamt field holds the
//     index of an IRF instruction that follows the R-type instruction. A
//     shift by a constant (sll, srl, sra) keeps its shift amount in the rs
//     field, which it does not otherwise use; it is moved back to shamt.
//   * a loosely packed I-type word (REGIMM, 0x04..0x0F, loads and stores):
//     imm[4:0] holds the index of the following IRF instruction and the
//     immediate is the 11-bit field 15:5, sign-extended (zero-extended for
//     andi, ori, xori, lui) back to 16 bits.
//   * anything else (j, jal, coprocessor, ...): a regular instruction.
//
// Outputs: slots[0..nslots-1] in issue order, and `regular`, the restored
// regular instruction that a slot with is_irf = 0 stands for. A loosely
// packed word gives two slots (regular, then IRF reference with parameter
// 0), a regular word one, a T-type word three to five. Index 0 (the nop)
// is listed like any other index; the sequencer decides whether to drop it.
//
// Purely combinational. The field positions and the eight T-type variants
// follow the packed IRF instruction formats; the opcode values, the variant
// numbering, which I-type opcodes are loosely packed, where the I-type index
// sits and the shift-amount relocation are this design's choices.
module packed_decode
  import irf_pkg::*;
(
  input  inst_t          word,
  output word_kind_t     kind,
  output slot_t          slots [MAX_SLOTS],
  output logic [2:0]     nslots,
  output inst_t          regular
);

  logic [5:0] opc;
  idx_t       f [5];
  ttype_variant_t variant;

  assign opc  = word[31:26];
  assign f[0] = word[25:21];
  assign f[1] = word[20:16];
  assign f[2] = word[15:11];
  assign f[3] = word[10:6];
  assign f[4] = word[4:0];
  assign variant = ttype_variant_t'({opc[1:0], word[5]});

  function automatic slot_t ref_slot(idx_t idx, idx_t param);
    return '{is_irf: 1'b1, idx: idx, param: param};
  endfunction

  always_comb begin
    for (int k = 0; k < MAX_SLOTS; k++) slots[k] = '0;
    nslots  = 3'd1;
    regular = word;
    kind    = W_REGULAR;

    if (is_ttype(opc[5:2])) begin
      kind = W_TIGHT;
      unique case (variant)
        T_TIGHT5: begin
          for (int k = 0; k < 5; k++) slots[k] = ref_slot(f[k], '0);
          nslots = 3'd5;
        end
        T_PARAM4_A, T_PARAM4_B, T_PARAM4_C, T_PARAM4_D: begin
          for (int k = 0; k < 4; k++) slots[k] = ref_slot(f[k], '0);
          slots[int'(variant) - int'(T_PARAM4_A)].param = f[4];
          nslots = 3'd4;
        end
        T_PARAM3_AB, T_PARAM3_AC, T_PARAM3_BC: begin
          for (int k = 0; k < 3; k++) slots[k] = ref_slot(f[k], '0);
          unique case (variant)
            T_PARAM3_AB: begin slots[0].param = f[3]; slots[1].param = f[4]; end
            T_PARAM3_AC: begin slots[0].param = f[3]; slots[2].param = f[4]; end
            default:     begin slots[1].param = f[3]; slots[2].param = f[4]; end
          endcase
          nslots = 3'd3;
        end
        default: ;
      endcase
    end else if (opc == OPC_SPECIAL) begin
      kind = W_LOOSE_R;
      slots[1] = ref_slot(word[10:6], '0);
      nslots = 3'd2;
      if (word[5:0] == FN_SLL || word[5:0] == FN_SRL || word[5:0] == FN_SRA)
        regular = {word[31:26], 5'd0, word[20:11], word[25:21], word[5:0]};
      else
        regular = {word[31:11], 5'd0, word[5:0]};
    end else if (is_loose_itype(opc)) begin
      kind = W_LOOSE_I;
      slots[1] = ref_slot(word[4:0], '0);
      nslots = 3'd2;
      regular = {word[31:16],
                 is_zext_imm(opc) ? 5'd0 : {5{word[15]}},
                 word[15:5]};
    end
  end

endmodule
