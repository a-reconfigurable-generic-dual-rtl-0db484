// tb_delay_1p5: drives a new random word after every rising edge and
// checks that the output shows each word exactly 1.5 clock cycles later
// (sampled in the middle of the following half cycle).
module tb_delay_1p5;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  logic [7:0] d, q;
  logic [7:0] hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay_1p5 #(.W(8)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  initial begin
    d = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); #1;
      d = 8'($urandom);
      hist.push_back(d);
      // value driven at t (just after an edge) must appear at t+1.5 cycles
      fork
        begin
          automatic logic [7:0] exp = d;
          #16;                           // t + 1.6 cycles: q valid from 1.5 to 2.5
          checks++;
          if (q !== exp) begin failures++; $display("FAIL at %0t exp %h got %h", $time, exp, q); end
        end
        begin
          automatic logic [7:0] exp = d;
          #13;                           // t + 1.3 cycles: not yet visible
          if (i > 0 && exp != hist[i-1]) begin
            checks++;
            if (q === exp) begin failures++; $display("FAIL early at %0t", $time); end
          end
        end
      join_none
    end
    #40;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
