// tb_safe_imem: loads random words through the load port and reads them
// back; the word and its generated parity must return one cycle after the
// address, and a wrong address parity must raise par_err.
module tb_safe_imem;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, en = 0, apar = 0, pwe = 0, rpar, perr;
  logic [15:0] addr = 0, rdata, paddr = 0, pdata = 0;
  logic [15:0] ref_mem [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  safe_imem #(.W(16), .DEPTH(256)) dut (.clk(clk), .rst_n(rst_n), .en(en), .addr(addr),
    .addr_par(apar), .rdata(rdata), .rpar(rpar), .par_err(perr),
    .prog_we(pwe), .prog_addr(paddr), .prog_data(pdata));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); pwe = 1; paddr = 16'(a); pdata = 16'($urandom); ref_mem[a] = pdata;
    end
    @(negedge clk) pwe = 0;
    for (int i = 0; i < 300; i++) begin
      logic [15:0] a; bit bad;
      @(negedge clk);
      a = 16'($urandom_range(0, 255)); bad = (i % 11 == 5);
      en = 1; addr = a; apar = ^a ^ bad;
      @(negedge clk); en = 0;
      chk(rdata == ref_mem[a] && rpar == ^ref_mem[a], "read data and parity");
      chk(perr == bad, "address parity check");
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
