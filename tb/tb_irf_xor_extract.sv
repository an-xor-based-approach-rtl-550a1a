// tb_irf_xor_extract: checks the XOR rebuild of IRF instructions.
//
// Directed cases: the two-instruction merge addu v0,a0,a1 / addu v0,t0,t1
// stored once as "addu v0, P, P^1" (S and T set, rs = 0, rt = 1) and
// rebuilt with parameters 4 and 8; a branch whose low offset bits are
// parameterized (I flag); an R-type with rd parameterized (D flag); and
// parameter 0 giving back the stored default instruction. Then random codes
// and parameters against a mask-based reference: each flag selects a 5-bit
// field mask and the expected instruction is inst ^ (mask & replicated
// param).
module tb_irf_xor_extract;
  import irf_pkg::*;

  irf_code_t code;
  idx_t      param;
  inst_t     instr;
  int checks = 0, failures = 0;

  irf_xor_extract dut (.code(code), .param(param), .instr(instr));

  task automatic check(input irf_code_t c, input idx_t p, input inst_t exp, input string what);
    code = c; param = p;
    #1;
    checks++;
    if (instr !== exp) begin
      failures++;
      $display("FAIL %s: code=%h param=%0d got %h exp %h", what, c, p, instr, exp);
    end
  endtask

  function automatic inst_t model(irf_code_t c, idx_t p);
    inst_t mask, rep;
    mask = '0;
    if (c.flags.s) mask |= 32'h03E0_0000;
    if (c.flags.t) mask |= 32'h001F_0000;
    if (c.flags.d) mask |= 32'h0000_F800;
    if (c.flags.i) mask |= 32'h0000_001F;
    rep = {6'd0, p, p, p, 5'd0, 1'b0, p};
    return c.inst ^ (mask & rep);
  endfunction

  initial begin
    irf_code_t c;
    // addu v0, P, P^1 : opcode 0, rs 0, rt 1, rd 2, funct 0x21
    c.flags = '{s: 1'b1, t: 1'b1, d: 1'b0, i: 1'b0};
    c.inst  = 32'h0001_1021;
    check(c, 5'd4, 32'h0085_1021, "addu v0,a0,a1");
    check(c, 5'd8, 32'h0109_1021, "addu v0,t0,t1");
    check(c, 5'd0, 32'h0001_1021, "default");
    // beq with offset bits 4:0 parameterized: beq s0, zero, 0x0010
    c.flags = '{s: 1'b0, t: 1'b0, d: 1'b0, i: 1'b1};
    c.inst  = 32'h1200_0010;
    check(c, 5'd3, 32'h1200_0013, "beq imm xor");
    // and with rd parameterized: and P, t1, t2 (rd = 0) param 17 -> s1
    c.flags = '{s: 1'b0, t: 1'b0, d: 1'b1, i: 1'b0};
    c.inst  = 32'h012A_0024;
    check(c, 5'd17, 32'h012A_8824, "and rd xor");
    // all flags, all ones
    c.flags = '1;
    c.inst  = 32'hFFFF_FFFF;
    check(c, 5'h1F, 32'hFC00_07E0, "all flags");

    repeat (2000) begin
      c = irf_code_t'({$urandom, $urandom});
      param = idx_t'($urandom);
      check(c, param, model(c, param), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
