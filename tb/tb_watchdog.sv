// tb_watchdog: unit test of the core-mode-triggered watchdog with a short
// timeout (TIMEOUT = 20, PULSE = 4) and a watchdog clock that is unrelated
// to the clock driving the mode signal.
//
// Checked: mode switches that come more often than the timeout keep the
// reset request low; without a switch the request goes high after the
// timeout and stays high for exactly PULSE watchdog cycles with the two
// rails complementary; the watchdog then times out again if still no
// switch arrives; invalid codewords (00/11) and a return to the same
// codeword do not count as a switch.
module tb_watchdog;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned TO = 20, PL = 4;

  logic       wclk = 1'b0, rst_n = 1'b0;
  logic [1:0] mode = 2'b10;
  logic       rst_t, rst_f, expired;
  int checks = 0, failures = 0;

  always #7 wclk = ~wclk;

  watchdog #(.TIMEOUT(TO), .PULSE(PL)) dut (
    .wclk(wclk), .rst_n(rst_n), .core_mode_dr(mode),
    .rst_t(rst_t), .rst_f(rst_f), .expired(expired)
  );

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  // output rails must always be complementary
  always @(posedge wclk) if (rst_n && rst_t == rst_f) begin
    failures++;
    $display("FAIL rails agree at %0t", $time);
  end

  int n_pulse = 0, len = 0, last_len = 0;
  always @(posedge wclk) begin
    if (!rst_n) len = 0;
    else if (rst_t) len++;
    else if (len != 0) begin last_len = len; len = 0; n_pulse++; end
  end

  task automatic switch_mode();
    @(negedge wclk);
    #3 mode = (mode == 2'b10) ? 2'b01 : 2'b10;
  endtask

  initial begin
    repeat (2000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog of the testbench");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int start;
  logic [1:0] prev;
  initial begin
    repeat (3) @(posedge wclk);
    rst_n = 1'b1;

    // regular switches, period shorter than the timeout
    for (int i = 0; i < 10; i++) begin
      repeat (TO - 6) @(posedge wclk);
      switch_mode();
    end
    chk(n_pulse == 0 && !rst_t, "no reset while the mode keeps switching");

    // invalid codewords and a switch back to the same codeword: no trigger
    prev = mode;
    repeat (6) @(posedge wclk);
    @(negedge wclk) mode = 2'b11;
    repeat (6) @(posedge wclk);
    @(negedge wclk) mode = 2'b00;
    repeat (6) @(posedge wclk);
    @(negedge wclk) mode = prev;    // same as before the invalid words
    wait (rst_t);
    chk(n_pulse == 0, "invalid codewords did not trigger");
    @(negedge rst_t);

    // timeout length measured from the last real switch
    switch_mode();
    start = 0;
    while (!rst_t) begin @(posedge wclk); #1 start++; end
    chk(start >= TO && start <= TO + 4, $sformatf("timeout after %0d cycles", start));
    @(negedge rst_t);
    @(posedge wclk);
    chk(last_len == PL, $sformatf("reset pulse %0d cycles", last_len));
    chk(rst_f && !rst_t, "idle after the pulse");

    // no switch: times out again
    wait (n_pulse == 3);
    chk(last_len == PL, "second pulse");

    // a switch during the count restarts it
    repeat (TO - 4) @(posedge wclk);
    switch_mode();
    repeat (TO - 4) @(posedge wclk);
    chk(n_pulse == 3 && !rst_t, "switch restarted the count");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
