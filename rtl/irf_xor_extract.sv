// irf_xor_extract: rebuilds an instruction from an IRF code and a parameter.
//
// This is the XOR merging logic that sits behind the IRF read port. The
// opcode (31:26), shamt (10:6) and funct (5:0, apart from imm[4:0] below)
// pass unchanged. Each of the four parameterizable fields is taken either
// from the stored instruction or from the stored instruction XOR param,
// chosen by its flag:
//   S -> rs  (25:21)    T -> rt  (20:16)
//   D -> rd  (15:11)    I -> imm (4:0)
// With param = 0 every field is unchanged, so the default instruction of
// the entry comes out; that is how parameter-free references are served.
// The flags are only set on fields the instruction format uses (the code
// selection keeps the rest zero), so D never touches an I-type immediate
// and I never touches an R-type funct.
//
// Purely combinational; one 2:1 select per field bit. The field split and
// the XOR/select structure follow the XOR merging scheme; the flag order in
// the code is this design's choice (see irf_pkg).
module irf_xor_extract
  import irf_pkg::*;
(
  input  irf_code_t code,
  input  idx_t      param,
  output inst_t     instr
);

  always_comb begin
    instr = code.inst;
    if (code.flags.s) instr[25:21] = code.inst[25:21] ^ param;
    if (code.flags.t) instr[20:16] = code.inst[20:16] ^ param;
    if (code.flags.d) instr[15:11] = code.inst[15:11] ^ param;
    if (code.flags.i) instr[4:0]   = code.inst[4:0]   ^ param;
  end

endmodule
