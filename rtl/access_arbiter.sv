// access_arbiter: resolves simultaneous memory requests of the two cores.
//
// Core 1 normally wins. To avoid starving core 2, core 2 wins a conflict
// when core 1 was granted in the previous cycle (scheme from the document).
// Grants are combinational from the requests; the only state is the flag
// recording that core 1 was granted in the last cycle. Used in split mode
// by both memory control units.
module access_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic req1,
  input  logic req2,
  output logic gnt1,
  output logic gnt2
);

  logic prev1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) prev1 <= 1'b0;
    else        prev1 <= gnt1;

  assign gnt2 = req2 && (!req1 || prev1);
  assign gnt1 = req1 && !gnt2;

  assert property (@(posedge clk) disable iff (!rst_n) !(gnt1 && gnt2));

endmodule
