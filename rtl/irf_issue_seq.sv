// irf_issue_seq: issues the instructions of one fetched word, one per cycle.
//
// A fetched word can carry up to five instructions (a T-type word) while
// the decoder takes one per cycle, so this sequencer holds the slot list of
// one word and steps through it, holding fetch off until the last slot is
// taken. When SKIP_NOP is set, references to IRF entry 0 (the nop used to
// pad unused fields) are removed as the word is accepted, so padding costs
// no decode cycle; a word that carries only padding yields nothing.
//
// Interface: in_valid/in_ready take a decoded word (slot list from
// packed_decode plus its restored regular instruction); out_valid/out_ready
// hand one slot at a time to the IRF read and decoder. A transfer happens
// when valid and ready are both high.
//
// Timing: a word accepted at edge n has its first slot on the outputs from
// edge n on; a word of k slots keeps out_valid high for k accepted cycles.
// The next word is accepted in the same cycle as the last slot leaves, so
// regular instructions flow at one per cycle with no bubble. The sequencing
// is this design's choice; padding with nop references follows the packed
// formats.
module irf_issue_seq
  import irf_pkg::*;
#(
  parameter bit SKIP_NOP = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  slot_t      in_slots [MAX_SLOTS],
  input  logic [2:0] in_nslots,
  input  inst_t      in_regular,
  output logic       out_valid,
  input  logic       out_ready,
  output slot_t      out_slot,
  output inst_t      out_regular
);

  slot_t      q [MAX_SLOTS];
  logic [2:0] cnt, pos;
  inst_t      regular_q;

  // compacted slot list of the incoming word
  slot_t      c_slots [MAX_SLOTS];
  logic [2:0] c_cnt;

  always_comb begin
    for (int k = 0; k < MAX_SLOTS; k++) c_slots[k] = '0;
    c_cnt = '0;
    for (int k = 0; k < MAX_SLOTS; k++) begin
      if (3'(k) < in_nslots &&
          !(SKIP_NOP && in_slots[k].is_irf && in_slots[k].idx == '0)) begin
        c_slots[c_cnt] = in_slots[k];
        c_cnt = c_cnt + 3'd1;
      end
    end
  end

  logic last;
  assign out_valid   = pos < cnt;
  assign last        = out_valid && (pos + 3'd1 == cnt);
  assign in_ready    = !out_valid || (out_ready && last);
  assign out_slot    = q[pos];
  assign out_regular = regular_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      pos <= '0;
      regular_q <= '0;
      for (int k = 0; k < MAX_SLOTS; k++) q[k] <= '0;
    end else if (in_valid && in_ready) begin
      q         <= c_slots;
      cnt       <= c_cnt;
      pos       <= '0;
      regular_q <= in_regular;
    end else if (out_valid && out_ready) begin
      pos <= pos + 3'd1;
    end
  end

  // The held word is not replaced while it still has slots to issue.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && in_ready) |-> (!out_valid || (out_ready && last)));
  assert property (@(posedge clk) disable iff (!rst_n) pos <= cnt);

endmodule
