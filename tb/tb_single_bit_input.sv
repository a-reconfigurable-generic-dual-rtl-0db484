// tb_single_bit_input: interrupt-style (ALWAYS_DELAY = 0) and reset-style
// (ALWAYS_DELAY = 1) instances. A pulse on the dual-rail input must reach
// core 1 after the two synchronizer stages and core 2 1.5 cycles after
// core 1 in lock mode; in split mode the interrupt reaches both together,
// the reset stays delayed. Disagreeing rails must show on err_dr.
module tb_single_bit_input;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, lock = 1, alt = 0;
  logic st = 0, sf = 1;
  logic i1, i2, r1, r2;
  logic [1:0] ie, re;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) alt <= ~alt;

  single_bit_input #(.ALWAYS_DELAY(1'b0)) u_irq (.clk(clk), .rst_n(rst_n), .lock(lock), .alt(alt),
    .sig_t(st), .sig_f(sf), .to_core1(i1), .to_core2(i2), .err_dr(ie));
  single_bit_input #(.ALWAYS_DELAY(1'b1)) u_rst (.clk(clk), .rst_n(rst_n), .lock(lock), .alt(alt),
    .sig_t(st), .sig_f(sf), .to_core1(r1), .to_core2(r2), .err_dr(re));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  realtime t1, t2;
  always @(posedge i1) t1 = $realtime;
  always @(posedge i2) t2 = $realtime;
  realtime u1, u2;
  always @(posedge r1) u1 = $realtime;
  always @(posedge r2) u2 = $realtime;

  initial begin
    #17;
    chk(r1 && r2 && !i1 && !i2, "reset asserted, interrupt idle during frame reset");
    #5 rst_n = 1;
    repeat (5) @(posedge clk);
    for (int m = 0; m < 2; m++) begin
      lock = (m == 0);
      @(negedge clk); st = 1; sf = 0;
      repeat (6) @(posedge clk);
      chk(i1 && i2, "interrupt reached both cores");
      if (lock) chk(t2 - t1 == 15.0, "interrupt lag 1.5 cycles in lock mode");
      else      chk(t2 == t1, "interrupt without lag in split mode");
      chk(u2 - u1 == 15.0, "reset lag 1.5 cycles in both modes");
      chk(ie[1] ^ ie[0], "rails consistent");
      @(negedge clk); st = 0; sf = 1;
      repeat (6) @(posedge clk);
      chk(!i1 && !i2 && !r1 && !r2, "released");
    end
    // rail disagreement
    @(negedge clk); st = 1; sf = 1;
    repeat (3) @(posedge clk); #1;
    chk(!(ie[1] ^ ie[0]), "rail disagreement flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
