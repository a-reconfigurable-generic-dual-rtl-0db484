// tsc_parity_checker: parity checker with an alternating dual-rail output.
//
// The code word {par, data} has even parity. It is split into two halves
// A = data[W/2-1:0] and B = {par, data[W-1:W/2]}; a valid word has
// ^A == ^B, so the pair {^A, ~^B} is 01 or 10 for a valid word and 00 or
// 11 for a parity error. Both rails are XORed with the alternation bit
// `alt` so the output alternates between the two valid code words while
// the input is correct (document: the checker output is an alternating
// dual-rail signal). Even parity and the split are this design's choices.
// Combinational.
module tsc_parity_checker #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] data,
  input  logic         par,
  input  logic         alt,
  output logic [1:0]   err_dr
);

  localparam int unsigned H = W / 2;

  logic pa, pb;
  assign pa     = ^data[H-1:0];
  assign pb     = ^{par, data[W-1:H]};
  assign err_dr = {pa ^ alt, ~pb ^ alt};

endmodule
