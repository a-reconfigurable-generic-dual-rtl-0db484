// dcf_pkg: types and constants shared by the reconfigurable dual-core frame.
//
// The frame wraps two 16-bit Harvard cores. It runs them either in lock
// mode (safety mode: master/checker, core 2 delayed by 1.5 clock cycles)
// or in split mode (performance mode: two independent instruction streams).
// The 16-bit word width and the core identification address (high byte
// 255, low byte 248) follow the document. The encoding of the mode switch
// instruction, the semaphore address and the dual-rail conventions below
// are this design's own choices.
package dcf_pkg;

  localparam int unsigned XLEN        = 16;  // word and address width
  localparam int unsigned BLOCK_WORDS = 4;   // instruction cache block size

  // Memory mapped registers inside the data RAM control unit.
  localparam logic [XLEN-1:0] ID_ADDR  = 16'hFFF8;  // core identification bit
  localparam logic [XLEN-1:0] SEM_ADDR = 16'hFFF9;  // data memory semaphore

  // Reserved mode switching instruction (a no-operation inside the core).
  localparam logic [XLEN-1:0] MS_INSTR = 16'hF000;

  // Operating mode. LOCK is the safety mode, SPLIT the performance mode.
  typedef enum logic {
    SPLIT = 1'b0,
    LOCK  = 1'b1
  } mode_e;

  // Dual-rail codes. A pair is valid (no error) when its two rails differ.
  // Core mode pair {t,f}: 2'b10 = lock, 2'b01 = split, 00/11 = invalid.
  typedef logic [1:0] dr_t;
  localparam dr_t DR_MODE_LOCK  = 2'b10;
  localparam dr_t DR_MODE_SPLIT = 2'b01;

  function automatic logic dr_ok(dr_t p);
    return p[1] ^ p[0];
  endfunction

  // Data access request issued by a core.
  typedef struct packed {
    logic            req;
    logic            we;
    logic [XLEN-1:0] addr;
    logic [XLEN-1:0] wdata;
  } dreq_t;

endpackage
