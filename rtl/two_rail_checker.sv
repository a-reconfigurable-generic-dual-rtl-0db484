// two_rail_checker: combines N dual-rail pairs into one dual-rail pair.
//
// Each input pair is valid when its two rails differ (01 or 10) and
// invalid (00 or 11) otherwise. The output is valid exactly when every
// input pair is valid, so a single error indication anywhere reaches the
// output. The pairs are folded one by one through the classic two-rail
// checker cell  z1 = x1&y1 | x0&y0,  z0 = x1&y0 | x0&y1,  which is itself
// self-checking. Alternating inputs (XORed with the alternation bit `alt`)
// are first brought back to their static form and the result is XORed
// with `alt` again, so the output alternates whatever N is; with alt tied
// to 0 the checker works on static pairs. The document asks for dual-rail
// error signals that a dual-rail comparator evaluates; the cell used here
// is this design's choice. Purely combinational.
module two_rail_checker #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0][1:0] in,
  input  logic              alt,
  output logic [1:0]        out
);

  always_comb begin
    logic [1:0] acc;
    acc = in[0] ^ {alt, alt};
    for (int unsigned i = 1; i < N; i++) begin
      logic [1:0] x;
      x   = in[i] ^ {alt, alt};
      acc = {(acc[1] & x[1]) | (acc[0] & x[0]),
             (acc[1] & x[0]) | (acc[0] & x[1])};
    end
    out = acc ^ {alt, alt};
  end

endmodule
