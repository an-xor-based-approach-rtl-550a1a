// irf_regfile: the instruction register file.
//
// ENTRIES codes of WIDTH bits (32 x 36 by default: a 32-bit instruction plus
// the S/T/D/I XOR flags). One synchronous write port loads the codes chosen
// for a program; one asynchronous read port returns the code addressed by an
// IRF index in the same cycle, so the stage can rebuild the instruction
// before the decode register.
//
// Entry 0 is reserved for the nop: reset clears every entry to all zeros,
// which is the nop (sll r0,r0,0) with no flags, and writes to entry 0 are
// ignored so the reserved nop cannot be lost. The size and the nop entry
// follow the IRF described for the XOR scheme; the write port, the
// asynchronous read and the reset behaviour are this design's choices.
//
// Timing: a write at a rising edge is visible on rdata after that edge.
module irf_regfile #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned WIDTH   = 36,
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned e = 0; e < ENTRIES; e++) mem[e] <= '0;
    end else if (we && waddr != '0) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
