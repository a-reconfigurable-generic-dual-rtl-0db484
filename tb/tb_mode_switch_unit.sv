// tb_mode_switch_unit: the testbench plays both mode switch detect units.
// Lock -> split: core 1 requests, core 2 1.5 cycles later; the mode must
// change one cycle after both requests are seen, core 2's clock must come
// into phase with no extra edge, and both waits drop together. Split ->
// lock: the mode changes at once, core 1 is released one cycle before
// core 2, whose clock is inverted so that it restarts 1.5 cycles after
// core 1. Core 2's clock must never show a pulse shorter than half a
// clock period. Also checked: messages, a lone request never switching,
// the dual-rail mode signal and the mode-dependent error selection.
module tb_mode_switch_unit;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, s1 = 0, s2 = 0;
  logic [1:0] es_i = 2'b01, ep_i = 2'b01, es_d = 2'b01, ep_d = 2'b01;
  logic w1, w2, m1, m2, clk2, lock, alt;
  logic [1:0] mode, err;
  int checks = 0, failures = 0, n_clk2 = 0;

  always #5 clk = ~clk;
  always @(posedge clk2) n_clk2++;

  // core 2 clock pulse widths
  realtime t_edge = 0, min_w = 1000;
  always @(clk2) if (rst_n) begin
    if ($realtime - t_edge < min_w) min_w = $realtime - t_edge;
    t_edge = $realtime;
  end

  mode_switch_unit dut (.clk(clk), .rst_n(rst_n), .core1_signal(s1), .core2_signal(s2),
    .err_safe_icu(es_i ^ {alt, alt}), .err_perf_icu(ep_i ^ {alt, alt}),
    .err_safe_dcu(es_d ^ {alt, alt}), .err_perf_dcu(ep_d ^ {alt, alt}),
    .wait1(w1), .wait2(w2), .message1(m1), .message2(m2), .clk_core2(clk2),
    .lock(lock), .core_mode_dr(mode), .error_dr(err), .alt(alt));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  realtime t_rel1, t_rel2;
  int e0, e1;

  initial begin
    #17;
    chk(mode == 2'b10 && lock, "reset into lock mode");
    #3 rst_n = 1;
    repeat (4) @(posedge clk);
    #2 chk(clk2 == ~clk, "core 2 on inverted clock in lock mode");
    // error selection in lock mode
    es_d = 2'b11; @(posedge clk); @(posedge clk); #1;
    chk(!(err[1] ^ err[0]), "lock-mode error reported");
    es_d = 2'b01; ep_d = 2'b00; @(posedge clk); @(posedge clk); #1;
    chk(err[1] ^ err[0], "split-mode-only error ignored in lock mode");
    ep_d = 2'b01;

    // ---- lock -> split ------------------------------------------------
    @(posedge clk); #1 s1 = 1;                 // core 1 fetched the switch instruction
    #0.1 chk(w1 && m2 && !w2, "core 1 halted at once, core 2 messaged");
    @(negedge clk); @(negedge clk); #1 s2 = 1; // core 2, 1.5 cycles later
    #0.1 chk(w2 && m1, "core 2 halted at once");
    @(posedge clk); #1;                        // T: both seen
    chk(mode == 2'b10 && w1 && w2, "still lock, both held at T");
    e0 = n_clk2;
    @(posedge clk); #1;                        // T+1
    chk(mode == 2'b01 && !lock, "split mode one cycle after both requests");
    chk(n_clk2 == e0 + 1, "core 2 lost half a cycle, no extra edge");
    chk(!w1 && !w2, "both released together");
    @(posedge clk); #1 s1 = 0; s2 = 0;         // cores moved on
    chk(clk2 == clk, "core 2 clock in phase");
    #5 chk(clk2 == clk, "core 2 clock in phase, low half");
    repeat (3) @(posedge clk);
    chk(mode == 2'b01 && !w1 && !w2, "stays in split mode");

    // ---- lone request does not switch -----------------------------------
    @(posedge clk); #1 s2 = 1;
    #0.1 chk(w2 && m1 && !w1, "lone request halts only its core");
    repeat (10) @(posedge clk);
    chk(mode == 2'b01, "no switch on a single request");
    // error selection in split mode
    es_i = 2'b00; @(posedge clk); @(posedge clk); #1;
    chk(err[1] ^ err[0], "lock-only error ignored in split mode");
    es_i = 2'b01; ep_i = 2'b11; @(posedge clk); @(posedge clk); #1;
    chk(!(err[1] ^ err[0]), "split-mode error reported");
    ep_i = 2'b01;

    // ---- split -> lock (core 2 is already waiting, core 1 comes) ------
    @(posedge clk); #1 s1 = 1;
    #0.1 chk(w1, "core 1 halted");
    @(posedge clk); #1;                        // T
    chk(mode == 2'b10 && lock, "lock mode at once");
    chk(!w1 && w2, "core 1 released, core 2 held");
    // core 1 restarts at its next rising edge T+1; core 2 at the first
    // clk2 edge with wait2 low
    @(posedge clk); t_rel1 = $realtime;
    @(posedge clk2 iff !w2); t_rel2 = $realtime;
    chk(t_rel2 - t_rel1 == 15.0, "core 2 restarts 1.5 cycles after core 1");
    chk(clk2 == 1 && clk == 0, "core 2 on inverted clock again");
    #1 s1 = 0; s2 = 0;
    repeat (3) @(posedge clk);
    chk(mode == 2'b10 && !w1 && !w2 && !m1 && !m2, "settled in lock mode");

    chk(min_w >= 5.0, $sformatf("shortest core 2 clock phase %0t", min_w));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
