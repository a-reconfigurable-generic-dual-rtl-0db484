// delay_1p5: delays a bus by 1.5 clock cycles (the Z^-1.5 element).
//
// In lock mode core 2 runs on the inverted clock, one and a half cycles
// behind core 1. Everything core 1 produces or receives must therefore be
// shifted by 1.5 cycles before it is compared with, or handed to, core 2.
// A value launched after rising edge t is captured by the rising-edge
// stage at t+1 and by the falling-edge stage at t+1.5, so `q` carries it
// from t+1.5 to t+2.5. Both stages reset to RST (asynchronous, active low).
// The 1.5 cycle figure is the document's; the two-stage structure is
// this design's.
module delay_1p5 #(
  parameter int unsigned W   = 16,
  parameter logic [W-1:0] RST = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] half;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) half <= RST;
    else        half <= d;

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) q <= RST;
    else        q <= half;

endmodule
