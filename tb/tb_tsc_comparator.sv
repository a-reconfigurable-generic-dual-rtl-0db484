// tb_tsc_comparator: random and single-bit-difference vectors; the result
// must be valid (01/10) exactly for equal inputs and alternate with alt.
module tb_tsc_comparator;
  logic [15:0] a, b;
  logic        alt;
  logic [1:0]  err;
  int checks = 0, failures = 0;

  tsc_comparator #(.W(16)) dut (.a(a), .b(b), .alt(alt), .err_dr(err));

  initial begin
    logic [1:0] prev;
    for (int i = 0; i < 400; i++) begin
      a   = 16'($urandom);
      b   = (i % 2) ? a : a ^ (16'h1 << ((i / 2) % 16));
      alt = i[1];
      #1;
      checks++;
      if ((err[1] ^ err[0]) != (a == b)) begin
        failures++; $display("FAIL a=%h b=%h err=%b", a, b, err);
      end
    end
    // equal inputs: output flips with alt
    a = 16'h1234; b = 16'h1234; alt = 0; #1; prev = err;
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
