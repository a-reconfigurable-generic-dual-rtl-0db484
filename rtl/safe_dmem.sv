// safe_dmem: shared data memory with per-word parity and a write-protected
// area for split mode.
//
// Synchronous single-port RAM of DEPTH words, each stored with its even
// parity bit. A read presented in cycle t returns word and stored parity
// in t+1. The memory checks the parity of the incoming address and write
// data; a write whose parity is wrong is not performed and raises
// `par_err` for one cycle.
//
// Write protection (document): the memory reads the dual-rail core mode
// signal; unless it shows lock mode (2'b10), writes into
// [PROT_BASE, PROT_BASE+PROT_SIZE) are refused and flagged on `wp_hit`.
// An invalid mode code counts as split mode.
//
// The document uses a dedicated "safe memory" with its own error
// detection and self test, which it does not describe; this block models
// only its parity and protection behaviour. Depth and the protected area
// are this design's choices; the address is taken modulo DEPTH.
module safe_dmem #(
  parameter int unsigned W         = 16,
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned PROT_BASE = 0,
  parameter int unsigned PROT_SIZE = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   core_mode_dr,
  input  logic         en,
  input  logic         we,
  input  logic [W-1:0] addr,
  input  logic         addr_par,
  input  logic [W-1:0] wdata,
  input  logic         wpar,
  output logic [W-1:0] rdata,
  output logic         rpar,
  output logic         par_err,
  output logic         wp_hit
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W:0] mem [DEPTH];
  logic       lock_mode, addr_ok, data_ok, in_prot, do_write;

  assign lock_mode = (core_mode_dr == dcf_pkg::DR_MODE_LOCK);
  assign addr_ok   = (^addr) == addr_par;
  assign data_ok   = (^wdata) == wpar;
  assign in_prot   = (32'(addr) >= PROT_BASE) && (32'(addr) < PROT_BASE + PROT_SIZE);
  assign do_write  = en && we && addr_ok && data_ok && (lock_mode || !in_prot);

  always_ff @(posedge clk)
    if (do_write) mem[addr[AW-1:0]] <= {wpar, wdata};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {rpar, rdata} <= '0;
      par_err       <= 1'b0;
      wp_hit        <= 1'b0;
    end else begin
      if (en && !we) {rpar, rdata} <= mem[addr[AW-1:0]];
      par_err <= en && (!addr_ok || (we && !data_ok));
      wp_hit  <= en && we && in_prot && !lock_mode;
    end
  end

endmodule
