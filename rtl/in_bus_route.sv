// in_bus_route: routing of an incoming parity-protected bus to both cores.
//
// The word and its parity bit go straight to core 1. Core 2 receives,
// through a multiplexer, either the same word delayed by 1.5 cycles (lock
// mode) or its own word (split mode). A parity checker sits on each core's
// branch, after the multiplexer for core 2, so that in lock mode at least
// one core is known to get a correct word. Side-band bits (valid strobes,
// word indexes) travel with the word: sb1 belongs to core 1's transfer and
// is also the one delayed for core 2 in lock mode; sb2 is core 2's own in
// split mode.
// Structure after the document's incoming bus figure (parity checkers,
// Z^-1.5 element, multiplexer); the side-band bits are this design's.
module in_bus_route #(
  parameter int unsigned W   = 16,
  parameter int unsigned SBW = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           lock,     // 1: lock (safety) mode
  input  logic           alt,      // alternation bit for the checkers
  input  logic [W-1:0]   data,
  input  logic           par,
  input  logic [SBW-1:0] sb1,
  input  logic [SBW-1:0] sb2,
  output logic [W-1:0]   data1,
  output logic           par1,
  output logic [SBW-1:0] sb1_out,
  output logic [W-1:0]   data2,
  output logic           par2,
  output logic [SBW-1:0] sb2_out,
  output logic [1:0]     err1_dr,  // parity checker on core 1's branch
  output logic [1:0]     err2_dr   // parity checker on core 2's branch
);

  logic [SBW+W:0] dly;

  delay_1p5 #(.W(SBW + W + 1)) u_dly (
    .clk(clk), .rst_n(rst_n), .d({sb1, par, data}), .q(dly)
  );

  assign data1   = data;
  assign par1    = par;
  assign sb1_out = sb1;

  always_comb begin
    if (lock) {sb2_out, par2, data2} = dly;
    else      {sb2_out, par2, data2} = {sb2, par, data};
  end

  tsc_parity_checker #(.W(W)) u_pc1 (.data(data1), .par(par1), .alt(alt), .err_dr(err1_dr));
  tsc_parity_checker #(.W(W)) u_pc2 (.data(data2), .par(par2), .alt(alt), .err_dr(err2_dr));

endmodule
