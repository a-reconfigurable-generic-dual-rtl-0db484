// tb_tsc_parity_checker: random words with correct and flipped parity;
// the pair must be valid exactly for even parity and alternate with alt.
module tb_tsc_parity_checker;
  logic [15:0] d;
  logic        p, alt;
  logic [1:0]  err;
  int checks = 0, failures = 0;

  tsc_parity_checker #(.W(16)) dut (.data(d), .par(p), .alt(alt), .err_dr(err));

  initial begin
    logic [1:0] prev;
    for (int i = 0; i < 400; i++) begin
      d   = 16'($urandom);
      p   = ^d ^ (i % 3 == 0);
      alt = i[0];
      #1;
      checks++;
      if ((err[1] ^ err[0]) != ((^d) == p)) begin
        failures++; $display("FAIL d=%h p=%b err=%b", d, p, err);
      end
    end
    d = 16'hA5A4; p = ^d; alt = 0; #1; prev = err;
    alt = 1; #1; checks++;
    if (err != ~prev) begin failures++; $display("FAIL alternation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
