// tb_burst_fsm: a miss must produce exactly the four word addresses of the
// block, in order, one per grant (grants given at random); the machine
// must not start a second burst while the miss request stays up.
module tb_burst_fsm;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, miss = 0, gnt = 0, mreq;
  logic [13:0] blk = 0;
  logic [15:0] maddr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  burst_fsm #(.W(16)) dut (.clk(clk), .rst_n(rst_n), .miss_req(miss), .miss_blk(blk),
                           .gnt(gnt), .mem_req(mreq), .mem_addr(maddr));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int b = 0; b < 20; b++) begin
      int n, cyc;
      @(negedge clk); miss = 1; blk = 14'($urandom);
      n = 0; cyc = 0;
      while (n < 4 && cyc < 100) begin
        @(negedge clk); cyc++;
        gnt = mreq && 1'($urandom);
        if (gnt) begin
          chk(maddr == {blk, 2'(n)}, $sformatf("word %0d address", n));
          n++;
        end
      end
      chk(n == 4, "four grants");
      @(negedge clk); gnt = 0;
      repeat (3) begin @(negedge clk); chk(!mreq, "no second burst while miss is held"); end
      miss = 0;
      @(negedge clk);
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
