// tb_out_bus_route: core 2 replays core 1's words 1.5 cycles later. The
// comparator must stay valid while they agree, flag a corrupted core 2
// word, ignore differing idle words, and the multiplexer must pass core 1
// in lock mode and the selected core with correct parity in split mode.
module tb_out_bus_route;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, lock = 1, alt = 0, sel2 = 0;
  logic [15:0] w1 = 0, w2 = 0, wo;
  logic c1 = 0, c2 = 0, co, a1 = 0, a2 = 0, po;
  logic [1:0] cmp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) alt <= ~alt;

  out_bus_route #(.W(16), .CW(1)) dut (
    .clk(clk), .rst_n(rst_n), .lock(lock), .alt(alt), .sel2(sel2),
    .word1(w1), .ctrl1(c1), .act1(a1), .word2(w2), .ctrl2(c2), .act2(a2),
    .word_out(wo), .par_out(po), .ctrl_out(co), .cmp_dr(cmp));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  // core 2 = core 1 delayed by 1.5 cycles, optionally corrupted
  logic [15:0] h_w; logic h_c, h_a; bit corrupt = 0;
  always @(posedge clk) {h_a, h_c, h_w} <= {a1, c1, w1};
  always @(negedge clk) begin
    {a2, c2, w2} <= {h_a, h_c, h_w ^ {15'b0, corrupt}};
  end

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 120; i++) begin
      bit c;
      @(posedge clk); #1;
      a1 = 1'($urandom); c1 = 1'($urandom);
      w1 = 16'($urandom);
      #2;
      chk(wo == w1 && co == c1 && po == ^w1, "lock mode passes core 1 with parity");
      // comparison happens on core 2's copy; sample at the next rising edge
      @(posedge clk); #0;
      if (i > 2) chk(cmp[1] ^ cmp[0], "agreeing cores compare equal");
      #1;
    end
    // deterministic mismatch: corrupted word while active
    @(posedge clk); #1; a1 = 1; w1 = 16'h1111; corrupt = 1;
    @(posedge clk); #1; a1 = 0;
    @(posedge clk); #1; corrupt = 0;
    chk(!(cmp[1] ^ cmp[0]), "corrupted active word flagged");
    // idle words differing are ignored
    @(posedge clk); #1; a1 = 0; w1 = 16'h2222; corrupt = 1;
    @(posedge clk); #1;
    @(posedge clk); #1; corrupt = 0;
    chk(cmp[1] ^ cmp[0], "idle word difference ignored");
    // split mode multiplexer
    lock = 0;
    force a2 = 1'b0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      sel2 = 1'($urandom);
      release w2; release c2;
      force w2 = 16'($urandom);
      force c2 = 1'($urandom);
      w1 = 16'($urandom);
      #1;
      chk(wo == (sel2 ? w2 : w1) && po == ^wo && co == (sel2 ? c2 : c1), "split mode multiplexer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
