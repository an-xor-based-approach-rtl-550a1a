// tb_packed_decode: checks the split of fetched words into slots.
//
// Directed words cover every T-type variant with distinct field values, a
// loosely packed R-type (plain and a shift by a constant) and I-type
// (sign- and zero-extended immediates), and regular words. Random words of
// every class follow. Expected slots come from irf_ref_pkg::ref_expand run
// on a probe IRF whose entry i is rebuilt as an instruction with i in the
// rs field and the parameter in imm[4:0], so each expected instruction
// names the index and parameter the slot must carry; regular slots are
// compared with the restored regular instruction.
module tb_packed_decode;
  import irf_pkg::*;
  import irf_ref_pkg::*;

  inst_t      word;
  word_kind_t kind;
  slot_t      slots [MAX_SLOTS];
  logic [2:0] nslots;
  inst_t      regular;
  int checks = 0, failures = 0;
  code_t probe [32];
  int seen_kind [4];

  packed_decode dut (.word, .kind, .slots, .nslots, .regular);

  task automatic check_word(input word_t w, input int exp_cls);
    exp_t q[$];
    word = w;
    #1;
    ref_expand(w, probe, 1'b0, q);
    checks++;
    seen_kind[kind]++;
    if (int'(kind) != exp_cls || int'(nslots) != q.size()) begin
      failures++;
      $display("FAIL word %h: kind %0d nslots %0d, exp kind %0d nslots %0d",
               w, kind, nslots, exp_cls, q.size());
      return;
    end
    foreach (q[k]) begin
      checks++;
      if (q[k].from_irf) begin
        if (!slots[k].is_irf || slots[k].idx != q[k].inst[25:21] ||
            slots[k].param != q[k].inst[4:0]) begin
          failures++;
          $display("FAIL word %h slot %0d: irf=%0d idx=%0d param=%0d, exp idx=%0d param=%0d",
                   w, k, slots[k].is_irf, slots[k].idx, slots[k].param,
                   q[k].inst[25:21], q[k].inst[4:0]);
        end
      end else if (slots[k].is_irf || regular != q[k].inst) begin
        failures++;
        $display("FAIL word %h slot %0d: regular %h exp %h", w, k, regular, q[k].inst);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) probe[i] = {4'b0001, 6'd0, 5'(i), 21'd0};
    for (int v = 0; v < 8; v++) check_word(make_t(v, 5'd1, 5'd2, 5'd3, 5'd4, 5'd5), 3);
    check_word(32'h0085_10e1, 1);            // addu v0,a0,a1 + index 3
    check_word({6'd0, 5'd7, 5'd9, 5'd8, 5'd6, 6'h00}, 1); // sll t0,t1,7 + index 6
    check_word({6'h09, 5'd29, 5'd29, 11'h7F8, 5'd4}, 2);  // addiu sp,sp,-8 + index 4
    check_word({6'h0D, 5'd2, 5'd2, 11'h7F8, 5'd4}, 2);    // ori: zero-extended
    check_word(32'h0810_0000, 0);            // j
    check_word(32'h4600_1000, 0);            // cop1
    repeat (4000) begin
      int cls;
      cls = $urandom % 4;
      check_word(rand_word(cls), cls);
    end
    foreach (seen_kind[k]) begin
      checks++;
      if (seen_kind[k] == 0) begin
        failures++;
        $display("FAIL word kind %0d never seen", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
