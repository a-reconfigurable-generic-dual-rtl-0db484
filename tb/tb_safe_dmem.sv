// tb_safe_dmem: random writes and reads in lock and split mode against a
// reference array. Writes into the protected area must be refused in
// split mode (and with an invalid mode code) and flagged on wp_hit;
// writes with bad parity must be refused and flagged on par_err.
module tb_safe_dmem;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, en = 0, we = 0, apar = 0, wpar = 0, rpar, perr, wph;
  logic [1:0] mode = 2'b10;
  logic [15:0] addr = 0, wdata = 0, rdata;
  logic [15:0] ref_mem [512];
  int checks = 0, failures = 0, nprot = 0;

  always #5 clk = ~clk;

  safe_dmem #(.W(16), .DEPTH(512), .PROT_BASE(0), .PROT_SIZE(64)) dut (
    .clk(clk), .rst_n(rst_n), .core_mode_dr(mode), .en(en), .we(we), .addr(addr),
    .addr_par(apar), .wdata(wdata), .wpar(wpar), .rdata(rdata), .rpar(rpar),
    .par_err(perr), .wp_hit(wph));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    #12 rst_n = 1;
    // initialise in lock mode
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); en = 1; we = 1; addr = 16'(a); apar = ^addr;
      wdata = 16'($urandom); wpar = ^wdata; ref_mem[a] = wdata;
    end
    for (int i = 0; i < 600; i++) begin
      logic [15:0] a; bit bad, w, prot, lockm;
      @(negedge clk);
      mode = (i < 200) ? 2'b10 : (i < 550) ? 2'b01 : 2'b11;
      lockm = (mode == 2'b10);
      a = 16'($urandom_range(0, 511)); w = 1'($urandom); bad = w && (i % 13 == 0);
      prot = (a < 64);
      en = 1; we = w; addr = a; apar = ^a; wdata = 16'($urandom); wpar = ^wdata ^ bad;
      if (w && !bad && (lockm || !prot)) ref_mem[a] = wdata;
      @(negedge clk); en = 0; we = 0;
      if (!w) chk(rdata == ref_mem[a] && rpar == ^ref_mem[a], "read data and parity");
      chk(perr == bad, "write data parity check");
      chk(wph == (w && prot && !lockm), "write protection flag");
      if (w && prot && !lockm) nprot++;
    end
    chk(nprot > 5, "protection exercised");
    // read everything back
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); en = 1; we = 0; addr = 16'(a); apar = ^addr;
      @(negedge clk); en = 0;
      chk(rdata == ref_mem[a], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
