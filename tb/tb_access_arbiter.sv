// tb_access_arbiter: random requests against a reference model of the
// priority rule (core 1 first, core 2 first after a core 1 grant);
// also checks that two permanent requesters alternate.
module tb_access_arbiter;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, r1 = 0, r2 = 0, g1, g2;
  int checks = 0, failures = 0;
  bit prev1 = 0;

  always #5 clk = ~clk;

  access_arbiter dut (.clk(clk), .rst_n(rst_n), .req1(r1), .req2(r2), .gnt1(g1), .gnt2(g2));

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (i < 500) begin r1 = 1'($urandom); r2 = 1'($urandom); end
      else begin r1 = 1; r2 = 1; end
      #1;
      begin
        bit e2, e1;
        e2 = r2 && (!r1 || prev1);
        e1 = r1 && !e2;
        checks++;
        if (g1 != e1 || g2 != e2) begin
          failures++; $display("FAIL r=%b%b prev1=%b g=%b%b", r1, r2, prev1, g1, g2);
        end
        @(posedge clk) prev1 = e1;
      end
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
