// irf_fetch_stage: the instruction register file stage between fetch and
// decode, with XOR-based merging of IRF entries.
//
// Fetched words come in on fetch_*; plain MIPS32 instructions leave on
// dec_*. A fetched word may be a regular instruction, a loosely packed
// instruction (a regular R- or I-type instruction plus the index of one IRF
// instruction) or a tightly packed T-type word (up to five IRF indexes, some
// with a 5-bit parameter). The stage
//   1. splits the word into its instructions (packed_decode),
//   2. issues them one per cycle (irf_issue_seq), stalling fetch meanwhile,
//   3. for an IRF reference reads the 36-bit code (irf_regfile) and
//      rebuilds the instruction by XORing the parameter into the fields the
//      code's S/T/D/I flags select (irf_xor_extract). A reference without a
//      parameter uses 0 and gets the entry's default instruction.
// The IRF is filled through irf_we/irf_waddr/irf_wdata, normally once when
// a program is loaded; entry 0 always holds the nop.
//
// Timing: a word accepted at edge n produces its first instruction on dec_*
// during the following cycle; each further instruction of the word takes
// one more cycle that dec_ready is high. The IRF read and XOR rebuild are
// combinational in the cycle the instruction is offered. dec_from_irf marks
// instructions that came from the IRF.
//
// The IRF size, the code format and the XOR rebuild follow the XOR merging
// scheme; the handshakes, the one-instruction-per-cycle issue and the
// dropping of nop padding (SKIP_NOP) are this design's choices.
module irf_fetch_stage
  import irf_pkg::*;
#(
  parameter int unsigned ENTRIES  = 32,
  parameter bit          SKIP_NOP = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  // IRF load port
  input  logic      irf_we,
  input  idx_t      irf_waddr,
  input  irf_code_t irf_wdata,
  // from instruction fetch
  input  logic      fetch_valid,
  output logic      fetch_ready,
  input  inst_t     fetch_instr,
  // to decode
  output logic      dec_valid,
  input  logic      dec_ready,
  output inst_t     dec_instr,
  output logic      dec_from_irf
);

  slot_t      d_slots [MAX_SLOTS];
  logic [2:0] d_nslots;
  inst_t      d_regular;

  packed_decode u_decode (
    .word    (fetch_instr),
    .kind    (),
    .slots   (d_slots),
    .nslots  (d_nslots),
    .regular (d_regular)
  );

  slot_t slot;
  inst_t regular;

  irf_issue_seq #(.SKIP_NOP(SKIP_NOP)) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (fetch_valid),
    .in_ready   (fetch_ready),
    .in_slots   (d_slots),
    .in_nslots  (d_nslots),
    .in_regular (d_regular),
    .out_valid  (dec_valid),
    .out_ready  (dec_ready),
    .out_slot   (slot),
    .out_regular(regular)
  );

  irf_code_t code;

  irf_regfile #(.ENTRIES(ENTRIES), .WIDTH(CODE_W)) u_irf (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (irf_we),
    .waddr (irf_waddr),
    .wdata (irf_wdata),
    .raddr (slot.idx),
    .rdata (code)
  );

  inst_t irf_instr;

  irf_xor_extract u_xor (
    .code  (code),
    .param (slot.param),
    .instr (irf_instr)
  );

  assign dec_instr    = slot.is_irf ? irf_instr : regular;
  assign dec_from_irf = slot.is_irf;

endmodule
