// tb_two_rail_checker: exhaustive test of the dual-rail combiner for N = 3.
// Every combination of input codes is applied with alt = 0 and 1; the
// output must be a valid code exactly when all inputs are valid, and it
// must alternate with alt.
module tb_two_rail_checker;
  logic [2:0][1:0] in;
  logic            alt;
  logic [1:0]      out;
  int checks = 0, failures = 0;

  two_rail_checker #(.N(3)) dut (.in(in), .alt(alt), .out(out));

  initial begin
    logic [1:0] out0;
    for (int a = 0; a < 2; a++)
      for (int v = 0; v < 64; v++) begin
        bit all_ok;
        in  = 6'(v) ^ {6{a[0]}};
        alt = a[0];
        #1;
        all_ok = 1;
        for (int i = 0; i < 3; i++) if (in[i][1] == in[i][0]) all_ok = 0;
        checks++;
        if ((out[1] != out[0]) != all_ok) begin
          failures++;
          $display("FAIL in=%b alt=%b out=%b", in, alt, out);
        end
      end
    // alternation: same static inputs, alt flipped
    in = 6'b10_01_10; alt = 0; #1; out0 = out;
    in = 6'b01_10_01; alt = 1; #1;
    checks++;
    if (out != ~out0) begin failures++; $display("FAIL alternation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
