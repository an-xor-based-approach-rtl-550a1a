// tb_irf_issue_seq: checks the one-slot-per-cycle sequencer.
//
// Phase 1 feeds random slot lists (1..5 slots, some references to entry 0)
// with random in_valid and out_ready and compares every slot that leaves
// with a scoreboard built from the input: slots in order, entry-0
// references dropped. Phase 2 streams single-slot words with both sides
// always ready and checks the rate: N words must leave in N cycles after
// the first (no bubble between words). Phase 3 checks that a five-slot word
// holds fetch off for exactly five cycles.
module tb_irf_issue_seq;
  import irf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  slot_t in_slots [MAX_SLOTS];
  logic [2:0] in_nslots = 3'd1;
  inst_t in_regular = '0, out_regular;
  slot_t out_slot;
  int checks = 0, failures = 0;

  typedef struct { slot_t s; inst_t r; } item_t;
  item_t sb[$];
  int dropped = 0, stalls = 0;

  irf_issue_seq dut (.clk, .rst_n, .in_valid, .in_ready, .in_slots, .in_nslots,
                     .in_regular, .out_valid, .out_ready, .out_slot, .out_regular);

  always #5 clk = ~clk;

  // scoreboard: record accepted words, compare issued slots
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      for (int k = 0; k < int'(in_nslots); k++) begin
        if (in_slots[k].is_irf && in_slots[k].idx == 0) dropped++;
        else sb.push_back('{s: in_slots[k], r: in_regular});
      end
    end
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      item_t e;
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL slot issued with empty scoreboard");
      end else begin
        e = sb.pop_front();
        if (out_slot != e.s || (!e.s.is_irf && out_regular != e.r)) begin
          failures++;
          $display("FAIL slot %p exp %p", out_slot, e.s);
        end
      end
    end
  end

  task automatic new_word(input int n, input bit nops);
    in_nslots = 3'(n);
    in_regular = $urandom;
    for (int k = 0; k < MAX_SLOTS; k++) begin
      in_slots[k].is_irf = (k > 0) || ($urandom % 2 == 0);
      in_slots[k].idx    = nops && ($urandom % 4 == 0) ? 5'd0 : 5'(1 + $urandom % 31);
      in_slots[k].param  = 5'($urandom);
    end
  endtask

  bit took = 0;
  int accepts = 0, issued = 0;
  always @(posedge clk) begin
    took = in_valid && in_ready && rst_n;
    if (took) accepts++;
    if (out_valid && out_ready && rst_n) issued++;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int a0, i0;
    new_word(1, 0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // phase 1: random traffic, random stalls on both sides
    repeat (4000) begin
      @(negedge clk);
      if (!in_valid || took) begin
        new_word(1 + $urandom % 5, 1);
        in_valid = ($urandom % 4) != 0;
      end
      out_ready = ($urandom % 4) != 0;
    end
    @(negedge clk) in_valid = 1'b0; out_ready = 1'b1;
    repeat (8) @(negedge clk);
    expect_eq(sb.size(), 0, "scoreboard drained");
    checks++;
    if (dropped == 0 || stalls == 0) begin
      failures++;
      $display("FAIL coverage: dropped=%0d stalls=%0d", dropped, stalls);
    end
    // phase 2: single-slot words, both sides ready: one per cycle
    new_word(1, 0);
    in_slots[0].idx = 5'd7;
    in_valid = 1'b1;
    @(negedge clk);
    a0 = accepts; i0 = issued;
    repeat (100) @(negedge clk);
    expect_eq(accepts - a0, 100, "words accepted in 100 cycles");
    expect_eq(issued - i0, 100, "slots issued in 100 cycles");
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    // phase 3: a five-slot word occupies the sequencer for five cycles
    new_word(5, 0);
    in_valid = 1'b1;
    @(negedge clk);                    // accepted at this edge
    expect_eq(accepts - a0, 101, "five-slot word accepted");
    new_word(1, 0);
    a0 = accepts; i0 = issued;
    repeat (4) begin
      checks++;
      if (in_ready) begin failures++; $display("FAIL in_ready high while busy"); end
      @(negedge clk);
    end
    checks++;
    if (!in_ready) begin failures++; $display("FAIL in_ready low on last slot"); end
    @(negedge clk);
    in_valid = 1'b0;
    expect_eq(accepts - a0, 1, "next word accepted with last slot");
    expect_eq(issued - i0, 5, "five slots in five cycles");
    repeat (4) @(negedge clk);
    expect_eq(sb.size(), 0, "scoreboard drained at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
