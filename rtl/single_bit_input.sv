// single_bit_input: protected routing of a dual-rail single-bit input
// (interrupt or reset) to both cores.
//
// The external signal arrives as a dual-rail pair (sig_t, sig_f = ~sig_t).
// Each rail passes its own two-stage synchronizer. The true rail goes to
// core 1. The inverted rail is delayed by 1.5 cycles and only then
// re-inverted for core 2, so a disturbance common to both rails reaches
// the cores at different points of their program flow. For an interrupt
// (ALWAYS_DELAY = 0) the delay is bypassed in split mode; for the reset
// (ALWAYS_DELAY = 1) it is always used, since the frame restarts in lock
// mode. While the frame reset is active the stage reads "not asserted"
// for an interrupt and "asserted" for a reset. `err_dr` is the synchronized pair XORed with the alternation bit:
// 01/10 while the rails are complementary, 00/11 when they agree.
// Routing per the document; the synchronizer depth is this design's.
module single_bit_input #(
  parameter bit ALWAYS_DELAY = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       lock,
  input  logic       alt,
  input  logic       sig_t,
  input  logic       sig_f,
  output logic       to_core1,
  output logic       to_core2,
  output logic [1:0] err_dr
);

  logic [1:0] sync_t, sync_f;
  logic       f_dly;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sync_t <= {2{ALWAYS_DELAY}};
      sync_f <= {2{!ALWAYS_DELAY}};
    end else begin
      sync_t <= {sync_t[0], sig_t};
      sync_f <= {sync_f[0], sig_f};
    end

  delay_1p5 #(.W(1), .RST(!ALWAYS_DELAY)) u_dly (.clk(clk), .rst_n(rst_n), .d(sync_f[1]), .q(f_dly));

  assign to_core1 = sync_t[1];
  assign to_core2 = (lock || ALWAYS_DELAY) ? ~f_dly : ~sync_f[1];
  assign err_dr   = {sync_t[1] ^ alt, sync_f[1] ^ alt};

endmodule
