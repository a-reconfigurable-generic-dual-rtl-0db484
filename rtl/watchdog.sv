// watchdog: external watchdog triggered by changes of the dual-rail core
// mode signal.
//
// The watchdog runs on its own clock `wclk`, which is independent of the
// frame clock, so a missing or broken frame clock cannot stop it. Each rail
// of `core_mode_dr` passes its own two-stage synchronizer. The watchdog is
// triggered when the synchronized pair changes from one valid codeword to
// the other, i.e. when an actual mode switch (10 -> 01 or 01 -> 10) has
// happened. An invalid codeword (00/11) never triggers it. If no trigger
// arrives for TIMEOUT wclk cycles, the watchdog drives a reset request for
// PULSE wclk cycles on the dual-rail output (rst_t = 1, rst_f = 0; idle
// is rst_t = 0, rst_f = 1), which is meant for the frame's protected
// reset inputs, and then starts counting again. The two output rails come
// from two separate registers.
//
// Interface: wclk, rst_n (asynchronous, active low), core_mode_dr (from
// the frame), rst_t / rst_f (to the frame's core reset pins), expired
// (one wclk cycle per timeout, for observation).
// Timing: the first reset request starts TIMEOUT + 1 wclk cycles after the
// last trigger (or after rst_n), plus the two synchronizer cycles on the
// trigger side.
//
// From the document: the watchdog is external, timed from a source of its
// own, and triggered by the core mode signal, so that only a mode switch
// requested by both cores keeps it quiet; its timeout forces the system
// out of a hung performance mode. The timeout, the pulse length, the
// synchronizer and the dual-rail reset output are this design's choices.
module watchdog #(
  parameter int unsigned TIMEOUT = 1024,
  parameter int unsigned PULSE   = 4
) (
  input  logic       wclk,
  input  logic       rst_n,
  input  logic [1:0] core_mode_dr,
  output logic       rst_t,
  output logic       rst_f,
  output logic       expired
);

  localparam int CW = $clog2(TIMEOUT + 1);
  localparam int PW = $clog2(PULSE + 1);

  logic [1:0]    sync1, sync2;
  logic [1:0]    last;      // last valid codeword seen
  logic          trigger;
  logic [CW-1:0] count;
  logic [PW-1:0] hold;
  logic          valid;

  assign valid   = sync2[1] ^ sync2[0];
  assign trigger = valid && (sync2 != last);
  assign expired = (hold == '0) && (count == CW'(TIMEOUT));

  always_ff @(posedge wclk or negedge rst_n)
    if (!rst_n) begin
      sync1 <= 2'b10;
      sync2 <= 2'b10;
      last  <= 2'b10;
      count <= '0;
      hold  <= '0;
      rst_t <= 1'b0;
      rst_f <= 1'b1;
    end else begin
      sync1 <= core_mode_dr;
      sync2 <= sync1;
      if (valid) last <= sync2;
      if (hold != '0) begin
        hold  <= hold - 1'b1;
        count <= '0;
      end else if (expired) begin
        hold  <= PW'(PULSE);
        count <= '0;
      end else if (trigger) begin
        count <= '0;
      end else begin
        count <= count + 1'b1;
      end
      rst_t <= (hold != '0 && hold != PW'(1)) || expired;
      rst_f <= !((hold != '0 && hold != PW'(1)) || expired);
    end

endmodule
