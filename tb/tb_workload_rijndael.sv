// tb_workload_rijndael: an AES round fragment through the IRF stage.
//
// The fragment repeats one three-instruction pattern on different
// registers, then loads:
//   addu t3,v0,t3   sll t7,t7,2   addiu t1,t1,768
//   addu s3,v0,s3   sll t6,t6,2   addiu t2,t2,768
//   addu s2,v0,s2   sll t5,t5,2   addiu s1,s1,768
//   lw   s4,0(s4)
// Without merging it needs ten IRF entries; with the XOR flags it needs
// four: addu with T and D set (rt = rd = register, parameter = register
// XOR 11), sll with T and D set, addiu with S and T set, and the lw. The
// ten instructions are packed into four T-type words (six of them carry a
// parameter) and must come out of the stage unchanged, in order, one per
// cycle once the words are in.
module tb_workload_rijndael;
  import irf_pkg::*;
  import irf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic irf_we = 1'b0;
  idx_t irf_waddr = '0;
  irf_code_t irf_wdata = '0;
  logic fetch_valid = 1'b0, fetch_ready, dec_valid, dec_ready = 1'b1, dec_from_irf;
  inst_t fetch_instr = '0, dec_instr;
  int checks = 0, failures = 0;
  int fetches = 0, got = 0;
  word_t exp_q[$];

  irf_fetch_stage dut (.clk, .rst_n, .irf_we, .irf_waddr, .irf_wdata,
                       .fetch_valid, .fetch_ready, .fetch_instr,
                       .dec_valid, .dec_ready, .dec_instr, .dec_from_irf);

  always #5 clk = ~clk;

  function automatic word_t rtype(int rs, int rt, int rd, int sh, int fn);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic word_t itype(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  localparam int V0 = 2, T1 = 9, T2 = 10, T3 = 11, T5 = 13, T6 = 14, T7 = 15;
  localparam int S1 = 17, S2 = 18, S3 = 19, S4 = 20;

  always @(posedge clk) if (rst_n) begin
    if (fetch_valid && fetch_ready) fetches++;
    if (dec_valid && dec_ready) begin
      checks++;
      got++;
      if (exp_q.size() == 0 || dec_instr != exp_q[0] || !dec_from_irf) begin
        failures++;
        $display("FAIL got %h exp %h", dec_instr, exp_q.size() ? exp_q[0] : 0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end

  task automatic write_irf(input int idx, input irf_code_t c);
    @(negedge clk);
    irf_we = 1'b1; irf_waddr = 5'(idx); irf_wdata = c;
    @(negedge clk);
    irf_we = 1'b0;
  endtask

  initial begin
    word_t words[4];
    int t0, t1;
    exp_q = '{rtype(V0, T3, T3, 0, 'h21), rtype(0, T7, T7, 2, 0), itype('h09, T1, T1, 768),
              rtype(V0, S3, S3, 0, 'h21), rtype(0, T6, T6, 2, 0), itype('h09, T2, T2, 768),
              rtype(V0, S2, S2, 0, 'h21), rtype(0, T5, T5, 2, 0), itype('h09, S1, S1, 768),
              itype('h23, S4, S4, 0)};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    write_irf(1, {4'b0110, exp_q[0]});   // addu t3,v0,t3  T,D
    write_irf(2, {4'b0110, exp_q[1]});   // sll t7,t7,2    T,D
    write_irf(3, {4'b1100, exp_q[2]});   // addiu t1,t1,768 S,T
    write_irf(4, {4'b0000, exp_q[9]});   // lw s4,0(s4)
    words = '{make_t(4, 5'd1, 5'd2, 5'd3, 5'd1, 5'(T3 ^ S3)),        // param4_D
              make_t(5, 5'd2, 5'd3, 5'd0, 5'(T7 ^ T6), 5'(T1 ^ T2)), // param3_AB
              make_t(5, 5'd1, 5'd2, 5'd0, 5'(T3 ^ S2), 5'(T7 ^ T5)), // param3_AB
              make_t(1, 5'd3, 5'd4, 5'd0, 5'd0, 5'(T1 ^ S1))};       // param4_A
    @(negedge clk);
    t0 = $time;
    foreach (words[k]) begin
      fetch_instr = words[k];
      fetch_valid = 1'b1;
      do begin @(posedge clk); #1; end while (!(fetch_valid && fetches == k + 1));
      @(negedge clk);
    end
    fetch_valid = 1'b0;
    while (got < 10 && $time - t0 < 1000) @(negedge clk);
    t1 = $time;
    checks++;
    if (got != 10 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d instructions delivered, %0d missing", got, exp_q.size());
    end
    checks++;
    if (fetches != 4) begin
      failures++;
      $display("FAIL %0d fetches", fetches);
    end
    // first instruction one cycle after the first word, then one per cycle
    checks++;
    if ((t1 - t0) / 10 != 11) begin
      failures++;
      $display("FAIL took %0d cycles, expected 11", (t1 - t0) / 10);
    end
    $display("rijndael fragment: %0d fetched words gave %0d instructions in %0d cycles",
             fetches, got, (t1 - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
