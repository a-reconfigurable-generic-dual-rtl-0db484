// tb_icu: the testbench plays both caches and the instruction memory
// (word at address a = f(a), even parity). Lock mode: core 1's cache asks
// for a block, core 2's cache asks for the same block 1.5 cycles later;
// both must receive the four words, core 2 each one 1.5 cycles after
// core 1, only core 1's addresses may reach the memory, and the lock-mode
// error signal must stay valid until core 2 asks for a different block.
// Split mode: both caches miss at once on different blocks; both must get
// their own words, the accesses must interleave (conflict seen) and take
// eight memory cycles. A word with bad parity must show on both error
// signals.
module tb_icu;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, lock = 1, alt = 0;
  logic clk2;
  logic mr1 = 0, mr2 = 0, fv1, fv2, ien, iapar, conflict;
  logic [13:0] mb1 = 0, mb2 = 0;
  logic [1:0] fi1, fi2, es, ep;
  logic [15:0] fd1, fd2, iaddr, rdata = 0;
  logic rpar = 0;
  bit   bad_par = 0;
  int checks = 0, failures = 0, n_en = 0, n_cf = 0, n_err_s = 0, n_pe = 0;

  always #5 clk = ~clk;
  assign clk2 = lock ? ~clk : clk;
  always @(posedge clk) alt <= ~alt;

  icu #(.W(16)) dut (.clk(clk), .clk2(clk2), .rst_n(rst_n), .rst2_n(rst_n), .lock(lock), .alt(alt),
    .miss_req1(mr1), .miss_blk1(mb1), .fill_valid1(fv1), .fill_idx1(fi1), .fill_data1(fd1),
    .miss_req2(mr2), .miss_blk2(mb2), .fill_valid2(fv2), .fill_idx2(fi2), .fill_data2(fd2),
    .imem_en(ien), .imem_addr(iaddr), .imem_addr_par(iapar), .imem_rdata(rdata), .imem_rpar(rpar),
    .err_safe_dr(es), .err_perf_dr(ep), .conflict(conflict));

  function automatic logic [15:0] f(input logic [15:0] a);
    return a ^ 16'h5A3C;
  endfunction

  // instruction memory model
  always @(posedge clk) if (ien && rst_n) begin
    rdata <= f(iaddr);
    rpar  <= ^f(iaddr) ^ bad_par;
    n_en++;
    if (iaddr[15:2] != (lock ? mb1 : iaddr[15:2])) begin
      failures++; $display("FAIL lock-mode memory address %h", iaddr);
    end
    checks++;
    if (iapar != ^iaddr) begin failures++; $display("FAIL address parity"); end
  end
  always @(posedge clk) if (conflict) n_cf++;
  always @(posedge clk) if (!(es[1] ^ es[0])) n_err_s++;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  // cache agents: request a block, collect four words, record arrival times
  realtime ta1 [4], ta2 [4];
  task automatic cache1(input logic [13:0] b);
    logic [3:0] got = 0;
    @(posedge clk); #1 mr1 = 1; mb1 = b;
    while (got != 4'hF) begin
      @(posedge clk);
      if (fv1) begin
        chk(fd1 == f({b, fi1}), "cache 1 word");
        got[fi1] = 1; ta1[fi1] = $realtime;
      end
    end
    #1 mr1 = 0;
  endtask
  task automatic cache2(input logic [13:0] b, input logic [13:0] bexp);
    logic [3:0] got = 0;
    @(posedge clk2); #1 mr2 = 1; mb2 = b;
    while (got != 4'hF) begin
      @(posedge clk2);
      if (fv2) begin
        chk(fd2 == f({bexp, fi2}), "cache 2 word");
        got[fi2] = 1; ta2[fi2] = $realtime;
      end
    end
    #1 mr2 = 0;
  endtask

  initial begin
    #22 rst_n = 1;
    // ---- lock mode, three blocks ------------------------------------------
    for (int k = 0; k < 3; k++) begin
      logic [13:0] b = 14'($urandom);
      n_err_s = 0;
      @(posedge clk);
      fork
        cache1(b);
        begin #16; cache2(b, b); end
      join
      foreach (ta1[i]) chk(ta2[i] - ta1[i] == 15.0, "core 2 word 1.5 cycles after core 1");
      repeat (3) @(posedge clk);
      chk(n_err_s == 0, "no lock-mode error for identical requests");
    end
    // core 2 asks for another block: comparator must fire
    n_err_s = 0;
    @(posedge clk);
    fork
      cache1(14'h0100);
      begin #16; cache2(14'h0101, 14'h0100); end
    join
    chk(n_err_s > 0, "diverging request detected");
    // ---- split mode -------------------------------------------------------
    repeat (4) @(posedge clk);
    @(negedge clk); lock = 0;
    repeat (4) @(posedge clk);
    n_en = 0; n_cf = 0;
    fork
      cache1(14'h0200);
      cache2(14'h0300, 14'h0300);
    join
    chk(n_en == 8, "eight memory accesses");
    chk(n_cf > 0, "conflict resolved");
    // parity error
    @(posedge clk); bad_par = 1;
    fork cache1(14'h0400); join
    bad_par = 0;
    chk(n_pe > 0, "bad parity shown on both error signals");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // parity errors must reach both error outputs
  always @(posedge clk) if (bad_par && !(ep[1] ^ ep[0]) && !(es[1] ^ es[0])) n_pe++;

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
