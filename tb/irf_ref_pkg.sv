// irf_ref_pkg: reference model of the packed IRF instruction set, used by
// the testbenches to work out expected results independently of the RTL.
//
// ref_expand() turns one fetched word into the list of instructions the
// decoder must see, given the IRF contents: T-type words are expanded from a
// per-variant table (number of references and which reference owns the
// parameter in field 4 and in field 5), loosely packed words give the
// restored regular instruction followed by the referenced entry, and other
// words pass unchanged. IRF instructions are rebuilt with a mask-based XOR.
// References to entry 0 are left out when skip_nop is set.
// Word builders make T-type and loosely packed words for the tests.
package irf_ref_pkg;

  typedef logic [31:0] word_t;
  typedef logic [35:0] code_t;

  // coverage kept by the model: parameterized fields actually changed
  // (S, T, D, I) and references to entry 0 left out
  int flag_hits [4];
  int nop_drops;

  typedef struct {
    word_t inst;
    bit    from_irf;
  } exp_t;

  // rebuild: flags {S,T,D,I} = code[35:32]
  function automatic word_t ref_rebuild(code_t c, logic [4:0] p);
    word_t m = '0;
    if (c[35]) m[25:21] = 5'h1F;
    if (c[34]) m[20:16] = 5'h1F;
    if (c[33]) m[15:11] = 5'h1F;
    if (c[32]) m[4:0]   = 5'h1F;
    return c[31:0] ^ (m & {6'd0, p, p, p, 5'd0, 1'b0, p});
  endfunction

  // T-type variant table: {count, owner of field-4 param (0 = none, 1..),
  // owner of field-5 param}
  function automatic void ttable(int v, output int n, output int o4, output int o5);
    case (v)
      0: begin n = 5; o4 = 0; o5 = 0; end
      1: begin n = 4; o4 = 0; o5 = 1; end
      2: begin n = 4; o4 = 0; o5 = 2; end
      3: begin n = 4; o4 = 0; o5 = 3; end
      4: begin n = 4; o4 = 0; o5 = 4; end
      5: begin n = 3; o4 = 1; o5 = 2; end
      6: begin n = 3; o4 = 1; o5 = 3; end
      default: begin n = 3; o4 = 2; o5 = 3; end
    endcase
  endfunction

  function automatic void push_ref(ref exp_t q[$], input code_t irf[32],
                                   input logic [4:0] idx, input logic [4:0] p,
                                   input bit skip_nop);
    exp_t e;
    if (skip_nop && idx == 0) begin
      nop_drops++;
      return;
    end
    if (p != 0) for (int f = 0; f < 4; f++) if (irf[idx][35-f]) flag_hits[f]++;
    e.inst = ref_rebuild(irf[idx], p);
    e.from_irf = 1'b1;
    q.push_back(e);
  endfunction

  function automatic void ref_expand(input word_t w, input code_t irf[32],
                                     input bit skip_nop, ref exp_t q[$]);
    int unsigned opc = w[31:26];
    logic [4:0] fld[5];
    exp_t e;
    fld = '{w[25:21], w[20:16], w[15:11], w[10:6], w[4:0]};
    if (opc >= 'h18 && opc <= 'h1B) begin
      int n, o4, o5;
      ttable(int'({w[27:26], w[5]}), n, o4, o5);
      for (int k = 1; k <= n; k++) begin
        logic [4:0] p = 0;
        if (o4 == k) p = fld[3];
        if (o5 == k) p = fld[4];
        push_ref(q, irf, fld[k-1], p, skip_nop);
      end
    end else if (opc == 0) begin
      e.from_irf = 1'b0;
      e.inst = w;
      e.inst[10:6] = 0;
      if (w[5:0] inside {6'h00, 6'h02, 6'h03}) begin
        e.inst[10:6]  = w[25:21];
        e.inst[25:21] = 0;
      end
      q.push_back(e);
      push_ref(q, irf, w[10:6], 0, skip_nop);
    end else if (opc == 1 || (opc >= 4 && opc <= 15) || (opc >= 'h20 && opc <= 'h2E)) begin
      logic [15:0] imm;
      imm = (opc >= 12 && opc <= 15) ? {5'd0, w[15:5]} : 16'(signed'(w[15:5]));
      e.from_irf = 1'b0;
      e.inst = {w[31:16], imm};
      q.push_back(e);
      push_ref(q, irf, w[4:0], 0, skip_nop);
    end else begin
      e.from_irf = 1'b0;
      e.inst = w;
      q.push_back(e);
    end
  endfunction

  // T-type word: variant v (0 tight5 .. 7 param3_BC), fields f1..f5
  function automatic word_t make_t(int v, logic [4:0] f1, logic [4:0] f2,
                                   logic [4:0] f3, logic [4:0] f4, logic [4:0] f5);
    logic [2:0] vv = 3'(v);
    return {4'b0110, vv[2:1], f1, f2, f3, f4, vv[0], f5};
  endfunction

  // random word of a given class: 0 regular, 1 loose R, 2 loose I, 3 T-type
  function automatic word_t rand_word(int cls);
    word_t w = $urandom;
    case (cls)
      0: begin
        int unsigned pick = $urandom % 6;
        logic [5:0] o;
        case (pick)
          0: o = 6'h02; 1: o = 6'h03; 2: o = 6'h11;
          3: o = 6'h1C; 4: o = 6'h2F; default: o = 6'h30 + 6'($urandom % 16);
        endcase
        w[31:26] = o;
      end
      1: w[31:26] = 6'h00;
      2: begin
        int unsigned pick = $urandom % 3;
        w[31:26] = pick == 0 ? 6'h01 : pick == 1 ? 6'(4 + $urandom % 12)
                                                 : 6'(32 + $urandom % 15);
      end
      default: w[31:26] = 6'(24 + $urandom % 4);
    endcase
    return w;
  endfunction

endpackage
