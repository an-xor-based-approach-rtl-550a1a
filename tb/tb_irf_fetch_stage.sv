// tb_irf_fetch_stage: end-to-end test of the IRF stage at its default
// parameters (32 entries, nop padding dropped).
//
// 1. After reset every entry must rebuild as the nop: a tight5 word of
//    non-zero indexes must give five all-zero instructions.
// 2. The IRF is loaded through the write port with random codes (a write
//    to entry 0 is tried and must be ignored).
// 3. A qsort inner loop of eight instructions, merged into five IRF
//    entries with the XOR flags, is packed into three T-type words and
//    must come out as the original eight instructions.
// 4. Random words of every kind (regular, loosely packed R and I, all
//    eight T-type variants) stream in with random fetch gaps and decoder
//    stalls; every instruction leaving is compared with the reference model
//    irf_ref_pkg::ref_expand run on a shadow copy of the IRF.
// 5. Rate: tight5 words of non-zero indexes with both sides always ready
//    must deliver one instruction per cycle and take a new word every five.
// Each mechanism (every word kind and T-type variant, every XOR flag
// changing a field, nop padding dropped, decoder stall, fetch held off,
// IRF write, write to entry 0 ignored) is counted; one that never happened
// counts as a failure.
module tb_irf_fetch_stage;
  import irf_pkg::*;
  import irf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic irf_we = 1'b0;
  idx_t irf_waddr = '0;
  irf_code_t irf_wdata = '0;
  logic fetch_valid = 1'b0, fetch_ready, dec_valid, dec_ready = 1'b0, dec_from_irf;
  inst_t fetch_instr = '0, dec_instr;

  irf_fetch_stage dut (.clk, .rst_n, .irf_we, .irf_waddr, .irf_wdata,
                       .fetch_valid, .fetch_ready, .fetch_instr,
                       .dec_valid, .dec_ready, .dec_instr, .dec_from_irf);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  code_t shadow [32];
  exp_t sb[$];
  int n_class [4];
  int n_variant [8];
  int n_stall = 0, n_fetch_hold = 0, n_writes = 0, n_zero_write = 0;
  int accepts = 0, issued = 0;
  bit took = 0;

  function automatic int word_class(word_t w);
    if (w[31:28] == 4'b0110) return 3;
    if (w[31:26] == 0) return 1;
    if (w[31:26] == 1 || (w[31:26] >= 4 && w[31:26] <= 15) ||
        (w[31:26] >= 'h20 && w[31:26] <= 'h2E)) return 2;
    return 0;
  endfunction

  always @(posedge clk) begin
    took = rst_n && fetch_valid && fetch_ready;
    if (rst_n) begin
      if (took) begin
        accepts++;
        n_class[word_class(fetch_instr)]++;
        if (word_class(fetch_instr) == 3) n_variant[{fetch_instr[27:26], fetch_instr[5]}]++;
        ref_expand(fetch_instr, shadow, 1'b1, sb);
      end
      if (fetch_valid && !fetch_ready) n_fetch_hold++;
      if (dec_valid && !dec_ready) n_stall++;
      if (dec_valid && dec_ready) begin
        exp_t e;
        issued++;
        checks++;
        if (sb.size() == 0) begin
          failures++;
          $display("FAIL instruction %h with nothing expected", dec_instr);
        end else begin
          e = sb.pop_front();
          if (dec_instr != e.inst || dec_from_irf != e.from_irf) begin
            failures++;
            $display("FAIL got %h (irf %0d) exp %h (irf %0d)", dec_instr,
                     dec_from_irf, e.inst, e.from_irf);
          end
        end
      end
    end
  end

  task automatic write_irf(input int idx, input code_t c);
    @(negedge clk);
    irf_we = 1'b1; irf_waddr = 5'(idx); irf_wdata = c;
    @(negedge clk);
    irf_we = 1'b0;
    n_writes++;
    if (idx != 0) shadow[idx] = c; else n_zero_write++;
  endtask

  // offer words from a list with both sides always ready
  task automatic send(input word_t ws[$]);
    foreach (ws[k]) begin
      @(negedge clk);
      fetch_instr = ws[k]; fetch_valid = 1'b1; dec_ready = 1'b1;
      do begin @(posedge clk); #1; end while (!took);
    end
    @(negedge clk) fetch_valid = 1'b0;
  endtask

  task automatic drain();
    @(negedge clk) fetch_valid = 1'b0; dec_ready = 1'b1;
    repeat (8) @(negedge clk);
    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("FAIL %0d instructions never came out", sb.size());
      sb.delete();
    end
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // MIPS encoders for the loop test
  function automatic word_t itype(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  initial begin
    word_t ws[$];
    word_t loop_exp[$];
    int i0, a0, n0;
    foreach (shadow[e]) shadow[e] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. reset contents
    i0 = issued;
    send('{make_t(0, 5'd3, 5'd9, 5'd17, 5'd30, 5'd31)});
    drain();
    expect_eq(issued - i0, 5, "nops after reset");

    // 3 (before the random load). qsort loop:
    //   lbu a0,0(s2); lbu a1,0(s3); addiu v0,v0,-1; sb a1,0(s2);
    //   sb a0,0(s3); addiu s2,s2,1; bnez v0,-24; addiu s3,s3,1
    // entry 1: lbu a0,0(s2)  S,T   (param 1 -> lbu a1,0(s3))
    // entry 2: addiu v0,v0,-1
    // entry 3: sb a1,0(s2)   S,T   (param 1 -> sb a0,0(s3))
    // entry 4: addiu s2,s2,1 S,T   (param 1 -> addiu s3,s3,1)
    // entry 5: bne v0,zero,-6
    loop_exp = '{itype('h24, 18, 4, 0), itype('h24, 19, 5, 0), itype('h09, 2, 2, -1),
                 itype('h28, 18, 5, 0), itype('h28, 19, 4, 0), itype('h09, 18, 18, 1),
                 itype('h05, 2, 0, -6), itype('h09, 19, 19, 1)};
    write_irf(1, {4'b1100, loop_exp[0]});
    write_irf(2, {4'b0000, loop_exp[2]});
    write_irf(3, {4'b1100, loop_exp[3]});
    write_irf(4, {4'b1100, loop_exp[5]});
    write_irf(5, {4'b0000, loop_exp[6]});
    i0 = issued;
    begin
      int base = checks, fails = failures;
      exp_t q[$];
      // the loop as three T-type words (eleven fields in use)
      ws = '{make_t(2, 5'd1, 5'd1, 5'd2, 5'd3, 5'd1),   // param4_B
             make_t(1, 5'd3, 5'd4, 5'd5, 5'd0, 5'd1),   // param4_A, one pad
             make_t(1, 5'd4, 5'd0, 5'd0, 5'd0, 5'd1)};  // param4_A, delay slot
      // independent check of the expected stream against the loop itself
      foreach (ws[k]) ref_expand(ws[k], shadow, 1'b1, q);
      expect_eq(q.size(), 8, "loop length in model");
      foreach (q[k]) if (k < 8) expect_eq(int'(q[k].inst == loop_exp[k]), 1, "loop model");
      send(ws);
      drain();
      expect_eq(issued - i0, 8, "loop instructions delivered");
      if (failures == fails) $display("qsort loop: 3 fetches gave 8 instructions (%0d checks)", checks - base);
    end

    // 2. random IRF contents, entry 0 write attempt
    write_irf(0, {4'b1111, 32'hDEAD_BEEF});
    for (int e = 1; e < 32; e++) write_irf(e, {4'($urandom), 32'($urandom)});

    // 4. random stream with gaps and stalls
    fork
      begin
        repeat (20000) begin
          @(negedge clk);
          if (!fetch_valid || took) begin
            int cls;
            cls = $urandom % 4;
            fetch_instr = rand_word(cls);
            // sprinkle nop padding into T-type and loose words
            if ($urandom % 3 == 0) fetch_instr[4:0] = 5'd0;
            fetch_valid = ($urandom % 5) != 0;
          end
          dec_ready = ($urandom % 4) != 0;
        end
      end
    join
    drain();

    // 5. rate: tight5 words, no padding
    @(negedge clk);
    fetch_instr = make_t(0, 5'd1, 5'd2, 5'd3, 5'd4, 5'd5);
    fetch_valid = 1'b1; dec_ready = 1'b1;
    @(negedge clk);
    a0 = accepts; i0 = issued;
    repeat (50) @(negedge clk);
    expect_eq(issued - i0, 50, "instructions in 50 cycles");
    expect_eq(accepts - a0, 10, "tight5 words in 50 cycles");
    drain();

    // coverage of the mechanisms
    foreach (n_class[k]) expect_eq(int'(n_class[k] > 0), 1, $sformatf("word kind %0d seen", k));
    foreach (n_variant[k]) expect_eq(int'(n_variant[k] > 0), 1, $sformatf("T variant %0d seen", k));
    foreach (flag_hits[k]) expect_eq(int'(flag_hits[k] > 0), 1, $sformatf("XOR flag %0d used", k));
    expect_eq(int'(nop_drops > 0), 1, "nop padding dropped");
    expect_eq(int'(n_stall > 0), 1, "decoder stall");
    expect_eq(int'(n_fetch_hold > 0), 1, "fetch held off");
    expect_eq(int'(n_writes > 0 && n_zero_write > 0), 1, "IRF writes");
    $display("coverage: kinds %p variants %p flags %p nop_drops %0d stalls %0d fetch_holds %0d writes %0d",
             n_class, n_variant, flag_hits, nop_drops, n_stall, n_fetch_hold, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
