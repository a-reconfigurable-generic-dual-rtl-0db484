// tb_icache: one cache with a behavioural refill responder (word value =
// f(address)). Checks returned instructions against f, the refill
// protocol, the lock-mode flag rules (split-loaded lines miss in lock
// mode, lock-loaded lines hit, other core's split refill clears the flag),
// the hold rule for an instruction already hitting at a mode change, and
// the own-refill report.
module tb_icache;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, lock = 0;
  logic [15:0] addr = 0, instr, fdata = 0;
  logic iv, mreq, fv = 0, clr_v = 0, oc_v;
  logic [13:0] mblk;
  logic [1:0] fidx = 0;
  logic [3:0] clr_l = 0, oc_l;
  int checks = 0, failures = 0, nfill = 0, nown = 0;

  always #5 clk = ~clk;

  icache #(.W(16), .LINES(16)) dut (.clk(clk), .rst_n(rst_n), .lock(lock),
    .addr(addr), .instr(instr), .instr_valid(iv), .miss_req(mreq), .miss_blk(mblk),
    .fill_valid(fv), .fill_idx(fidx), .fill_data(fdata),
    .clr_valid(clr_v), .clr_line(clr_l), .own_clr_valid(oc_v), .own_clr_line(oc_l));

  function automatic logic [15:0] f(input logic [15:0] a);
    return a * 16'd37 + 16'd5;
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  // refill responder: words in random order, random gaps
  initial begin
    forever begin
      @(negedge clk);
      if (mreq) begin
        logic [13:0] b; int order [4];
        b = mblk; order = '{0, 1, 2, 3};
        order.shuffle();
        nfill++;
        foreach (order[k]) begin
          repeat ($urandom_range(0, 2)) @(negedge clk);
          fv = 1; fidx = 2'(order[k]); fdata = f({b, 2'(order[k])});
          @(negedge clk); fv = 0;
        end
        @(negedge clk);
      end
    end
  end

  always @(posedge clk) if (oc_v) nown++;

  task automatic fetch(input logic [15:0] a, output int cycles);
    @(negedge clk); addr = a; cycles = 0;
    #1;
    while (!iv && cycles < 200) begin @(negedge clk); cycles++; end
    chk(iv && instr == f(a), $sformatf("instruction at %h", a));
  endtask

  initial begin
    int c, f0, o0;
    #12 rst_n = 1;
    // split mode: random fetches in a 128-word window
    for (int i = 0; i < 300; i++) fetch(16'($urandom_range(0, 127)), c);
    chk(nown == nfill, "every split-mode refill reported");
    // line 0x40.. loaded in split mode
    fetch(16'h0041, c);
    fetch(16'h0042, c);
    chk(c == 0, "hit in split mode");
    // mode change while sitting on a hitting instruction: keeps hitting
    @(posedge clk); @(negedge clk);
    lock = 1; #1;
    chk(iv && instr == f(16'h0042), "held instruction keeps hitting after mode change");
    // a different address in the same split-loaded line must miss in lock mode
    f0 = nfill; o0 = nown;
    fetch(16'h0043, c);
    chk(nfill == f0 + 1 && c > 0, "split-loaded line refetched in lock mode");
    chk(nown == o0, "lock-mode refill not reported as a split refill");
    fetch(16'h0040, c);
    chk(c == 0, "lock-loaded line hits in lock mode");
    // other core reloads the line in split mode: flag cleared
    lock = 0;
    @(negedge clk); clr_v = 1; clr_l = 4'h0;
    @(negedge clk); clr_v = 0;
    fetch(16'h0005, c);               // a line with a different index
    fetch(16'h0042, c);
    chk(c == 0, "still valid in split mode");
    lock = 1;
    fetch(16'h0041, c);
    chk(c > 0, "other core's split refill clears the lock flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
