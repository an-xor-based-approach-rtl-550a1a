// tb_irf_regfile: checks the IRF storage.
//
// After reset every entry must read as the nop code (all zeros). The test
// then writes random codes to random entries (entry 0 included, whose
// writes must be ignored), keeps a shadow copy, and after each write reads
// a random entry and the just-written entry and compares them with the
// shadow. A second reset must clear everything again.
module tb_irf_regfile;
  localparam int unsigned ENTRIES = 32;
  localparam int unsigned WIDTH   = 36;

  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] shadow [ENTRIES];
  int checks = 0, failures = 0;

  irf_regfile dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic read_check(input logic [4:0] a);
    raddr = a;
    #1;
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      $display("FAIL entry %0d: got %h exp %h", a, rdata, shadow[a]);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (shadow[e]) shadow[e] = '0;
    for (int e = 0; e < ENTRIES; e++) read_check(5'(e));
    repeat (1500) begin
      logic [4:0] a;
      logic [WIDTH-1:0] d;
      a = 5'($urandom);
      d = {4'($urandom), 32'($urandom)};
      @(negedge clk);
      we = ($urandom % 4) != 0; waddr = a; wdata = d;
      @(posedge clk);
      #1;
      if (we && a != 0) shadow[a] = d;
      we = 1'b0;
      read_check(a);
      read_check(5'($urandom));
    end
    read_check(5'd0);
    @(negedge clk) rst_n = 1'b0;
    @(posedge clk) #1 rst_n = 1'b1;
    foreach (shadow[e]) shadow[e] = '0;
    for (int e = 0; e < ENTRIES; e++) read_check(5'(e));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
