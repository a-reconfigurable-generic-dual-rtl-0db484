// tb_in_bus_route: a new word (with parity and side band) every cycle.
// Lock mode: core 1 sees it at once, core 2 1.5 cycles later. Split mode:
// core 2 sees the word directly with its own side band. Parity errors
// must show on both branch checkers (core 2's 1.5 cycles later in lock).
module tb_in_bus_route;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, lock = 1, alt = 0;
  logic [15:0] d, d1, d2;
  logic p, p1, p2;
  logic [1:0] sb1, sb2, so1, so2, e1, e2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) alt <= ~alt;

  in_bus_route #(.W(16), .SBW(2)) dut (
    .clk(clk), .rst_n(rst_n), .lock(lock), .alt(alt), .data(d), .par(p),
    .sb1(sb1), .sb2(sb2), .data1(d1), .par1(p1), .sb1_out(so1),
    .data2(d2), .par2(p2), .sb2_out(so2), .err1_dr(e1), .err2_dr(e2));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    d = 0; p = 0; sb1 = 0; sb2 = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic [15:0] w; logic bad; logic [1:0] s1;
      lock = (i < 100);
      @(posedge clk); #1;
      w = 16'($urandom); bad = (i % 7 == 3); s1 = 2'($urandom);
      d = w; p = ^w ^ bad; sb1 = s1; sb2 = ~s1;
      #2;
      chk(d1 == w && so1 == s1, "core 1 direct");
      chk((e1[1] ^ e1[0]) == !bad, "core 1 parity checker");
      if (!lock) begin
        chk(d2 == w && so2 == ~s1, "core 2 direct in split mode");
        chk((e2[1] ^ e2[0]) == !bad, "core 2 parity checker split");
      end else if (i < 98) begin
        fork
          begin
            automatic logic [15:0] ew = w; automatic logic eb = bad; automatic logic [1:0] es = s1;
            #14;
            chk(d2 == ew && so2 == es, "core 2 delayed in lock mode");
            chk((e2[1] ^ e2[0]) == !eb, "core 2 parity checker lock");
          end
        join_none
      end
    end
    #30;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
