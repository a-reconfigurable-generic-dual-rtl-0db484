// tsc_comparator: self-checking equality comparator with an alternating
// dual-rail result.
//
// Bit i of a and the inverse of bit i of b form a dual-rail pair that is
// valid exactly when a[i] == b[i]; all pairs are reduced by a two-rail
// checker. The result is then XORed on both rails with the alternation bit
// `alt`, which flips every clock, so that a healthy comparator keeps
// changing its output (01, 10, 01, ...) and a rail stuck at either value is
// seen. Output 01/10 = equal, 00/11 = mismatch. Combinational.
// The document asks for totally self-checking comparators on all output
// buses; this particular structure is this design's choice.
module tsc_comparator #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         alt,
  output logic [1:0]   err_dr
);

  logic [W-1:0][1:0] pairs;
  logic [1:0]        red;

  always_comb
    for (int unsigned i = 0; i < W; i++) pairs[i] = {a[i], ~b[i]};

  two_rail_checker #(.N(W)) u_trc (.in(pairs), .alt(1'b0), .out(red));

  assign err_dr = red ^ {alt, alt};

endmodule
