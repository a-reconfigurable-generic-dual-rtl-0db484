// mode_switch_unit: sequences the switch between lock mode (safety,
// master/checker) and split mode (performance), generates the clock of
// core 2, the dual-rail core mode signal and the selected error signal.
//
// A switch needs a request from both cores (their mode switch detect
// units). A core that requests is halted at once (wait1/wait2 follow the
// request combinationally) and the other core is interrupted (message2 or
// message1) until it requests as well. In lock mode core 1 always arrives
// first and core 2 follows 1.5 cycles later without needing the message.
//
// Timing of a switch, with T the rising clock edge at which both requests
// are first seen:
//   lock -> split: core 2's last inverted edge is T+0.5, its first in-phase
//     edge T+2 (it loses half a cycle); at T+1 the mode becomes split and
//     the waits drop; both cores resume at T+2.
//   split -> lock: the mode becomes lock at T; core 1 resumes at T+1; core 2
//     is held, its clock has edges at T, T+1.5, T+2.5, and it resumes at
//     T+2.5, 1.5 cycles behind core 1.
// A request is consumed by the switch; it is accepted again only after the
// detect signal has dropped (the core has moved past the instruction).
// After reset the frame is in lock mode with core 2 on the inverted clock.
//
// The core mode signal is a dual-rail pair {t,f} (10 = lock, 01 = split)
// whose two rails are separate registers with separate next-state logic.
// The error output selects the lock-mode error signals of the memory
// control units (comparators and parity checkers) once lock mode has
// settled for two cycles after a switch (at once after reset, when both
// cores start from the same reset state), and the split-mode ones (parity
// only) otherwise;
// the result is combined by a two-rail checker and registered. `alt`
// toggles every cycle and drives the alternating dual-rail checkers.
//
// The signal names wait1/wait2, message1/message2, clk_core2 and the two
// states lock/split follow the document's timing diagram; the exact cycle
// counts above, active-high waits and the settle delay are this design's.
module mode_switch_unit (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       core1_signal,
  input  logic       core2_signal,
  input  logic [1:0] err_safe_icu,
  input  logic [1:0] err_perf_icu,
  input  logic [1:0] err_safe_dcu,
  input  logic [1:0] err_perf_dcu,
  output logic       wait1,
  output logic       wait2,
  output logic       message1,
  output logic       message2,
  output logic       clk_core2,
  output logic       lock,        // internal single-rail mode, 1 = lock
  output logic [1:0] core_mode_dr,
  output logic [1:0] error_dr,
  output logic       alt
);

  import dcf_pkg::*;

  typedef enum logic [2:0] {S_LOCK, S_TO_SPLIT, S_SPLIT, S_TO_LOCK1, S_TO_LOCK2} state_e;

  state_e state;
  logic   p1, p2;          // request seen and pending
  logic   done1, done2;    // request consumed by a switch
  logic   h1, h2;          // hold during alignment
  logic   req1, req2, both;
  logic   want_inv;        // core 2 should run on the inverted clock
  logic   en_true, en_inv; // clock switch enables
  logic   mode_t, mode_f;
  logic [1:0] settle;
  logic [1:0] err_sel_safe, err_sel_perf, err_comb;

  assign req1 = core1_signal && !done1;
  assign req2 = core2_signal && !done2;
  assign both = (req1 || p1) && (req2 || p2);

  assign wait1    = req1 || p1 || h1;
  assign wait2    = req2 || p2 || h2;
  assign message2 = req1 || p1;
  assign message1 = req2 || p2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOCK;
      {p1, p2, done1, done2, h1, h2} <= '0;
    end else begin
      done1 <= done1 && core1_signal;
      done2 <= done2 && core2_signal;
      p1    <= p1 || req1;
      p2    <= p2 || req2;
      unique case (state)
        S_LOCK, S_SPLIT: if (both) begin
          {p1, p2}       <= 2'b00;
          {done1, done2} <= 2'b11;
          if (state == S_LOCK) begin
            state    <= S_TO_SPLIT;
            {h1, h2} <= 2'b11;
          end else begin
            state    <= S_TO_LOCK1;
            {h1, h2} <= 2'b01;
          end
        end
        S_TO_SPLIT: begin
          state    <= S_SPLIT;
          {h1, h2} <= 2'b00;
        end
        S_TO_LOCK1: state <= S_TO_LOCK2;
        S_TO_LOCK2: begin
          state <= S_LOCK;
          h2    <= 1'b0;
        end
        default: state <= S_LOCK;
      endcase
    end
  end

  // Glitch-free clock switch for core 2. Each source has its own enable,
  // registered on the falling edge of that source (en_true on the falling
  // edge of clk, en_inv on the rising edge), and an enable only rises once
  // the other has fallen, so the output never shows a short pulse.
  assign want_inv = (state == S_LOCK) || (state == S_TO_LOCK1) || (state == S_TO_LOCK2);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) en_inv <= 1'b1;
    else        en_inv <= want_inv && !en_true;

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) en_true <= 1'b0;
    else        en_true <= !want_inv && !en_inv;

  assign clk_core2 = (clk & en_true) | (~clk & en_inv);

  // Dual-rail mode, two independently computed rails.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_t <= 1'b1;
      mode_f <= 1'b0;
    end else begin
      unique case (state)
        S_LOCK:     mode_t <= 1'b1;
        S_TO_SPLIT: mode_t <= 1'b0;
        S_SPLIT:    mode_t <= both;
        default:    mode_t <= 1'b1;
      endcase
      unique case (state)
        S_TO_SPLIT: mode_f <= 1'b1;
        S_SPLIT:    mode_f <= !both;
        default:    mode_f <= 1'b0;
      endcase
    end
  end

  assign lock         = mode_t;
  assign core_mode_dr = {mode_t, mode_f};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                 settle <= 2'd2;
    else if (state != S_LOCK)   settle <= '0;
    else if (settle != 2'd2)    settle <= settle + 2'd1;

  two_rail_checker #(.N(2)) u_trc_safe (.in({err_safe_icu, err_safe_dcu}), .alt(alt), .out(err_sel_safe));
  two_rail_checker #(.N(2)) u_trc_perf (.in({err_perf_icu, err_perf_dcu}), .alt(alt), .out(err_sel_perf));

  assign err_comb = (settle == 2'd2) ? err_sel_safe : err_sel_perf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      error_dr <= 2'b01;
      alt      <= 1'b0;
    end else begin
      error_dr <= err_comb;
      alt      <= !alt;
    end
  end

endmodule
