// out_bus_route: routing of an outgoing bus from both cores to one memory
// port, with parity generation and master/checker comparison.
//
// Each core's word gets its own even parity bit. Core 1's word, parity and
// control bits are delayed by 1.5 cycles and compared with core 2's; since
// the parities take part in the comparison, the two parity generators check
// each other. Word and parity are compared only in cycles in which the
// core marks them as driven (`act1`, `act2`, core 1's delayed with it);
// control bits always. An idle bus still shows the last value the core
// drove, which after split mode differs between the two cores. The
// comparison result is an alternating dual-rail pair
// (01/10 equal, 00/11 mismatch); it is meaningful in lock mode only. The
// output multiplexer passes core 1 in lock mode and, in split mode, the
// core selected by `sel2` (the arbiter's grant). Combinational apart from
// the delay element.
// Structure after the document's outgoing bus figure; the split of the
// compared signals into a parity-covered word and control bits is this
// design's.
module out_bus_route #(
  parameter int unsigned W  = 16,
  parameter int unsigned CW = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          lock,
  input  logic          alt,
  input  logic          sel2,     // split mode: 1 selects core 2
  input  logic [W-1:0]  word1,
  input  logic [CW-1:0] ctrl1,
  input  logic          act1,     // core 1 drives word1 this cycle
  input  logic [W-1:0]  word2,
  input  logic [CW-1:0] ctrl2,
  input  logic          act2,     // core 2 drives word2 this cycle
  output logic [W-1:0]  word_out,
  output logic          par_out,
  output logic [CW-1:0] ctrl_out,
  output logic [1:0]    cmp_dr
);

  logic           par1, par2;
  logic [CW+W+1:0] dly1;
  logic [W:0]      cw1, cw2;

  assign par1 = ^word1;
  assign par2 = ^word2;

  delay_1p5 #(.W(CW + W + 2)) u_dly (
    .clk(clk), .rst_n(rst_n), .d({act1, ctrl1, par1, word1}), .q(dly1)
  );

  assign cw1 = dly1[CW+W+1] ? dly1[W:0] : '0;
  assign cw2 = act2 ? {par2, word2} : '0;

  tsc_comparator #(.W(CW + W + 2)) u_cmp (
    .a({dly1[CW+W+1:W+1], cw1}), .b({act2, ctrl2, cw2}), .alt(alt), .err_dr(cmp_dr)
  );

  always_comb begin
    if (!lock && sel2) {ctrl_out, par_out, word_out} = {ctrl2, par2, word2};
    else               {ctrl_out, par_out, word_out} = {ctrl1, par1, word1};
  end

endmodule
