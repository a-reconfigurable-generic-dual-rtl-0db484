// tb_mode_switch_detect: the signal must be high exactly for a valid
// mode switch instruction on the bus.
module tb_mode_switch_detect;
  logic [15:0] instr;
  logic        v, s;
  int checks = 0, failures = 0;

  mode_switch_detect dut (.instr(instr), .instr_valid(v), .core_signal(s));

  initial begin
    for (int i = 0; i < 300; i++) begin
      instr = (i % 4 == 0) ? 16'hF000 : 16'($urandom);
      v     = 1'($urandom);
      #1;
      checks++;
      if (s != (v && instr == 16'hF000)) begin failures++; $display("FAIL %h %b %b", instr, v, s); end
    end
    instr = 16'hF001; v = 1; #1; checks++;
    if (s) begin failures++; $display("FAIL near miss"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
