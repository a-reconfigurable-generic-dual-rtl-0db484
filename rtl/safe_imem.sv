// safe_imem: shared instruction memory with per-word parity.
//
// Synchronous RAM of DEPTH 16-bit instructions, each stored with its even
// parity bit. A read presented in cycle t returns the instruction and its
// stored parity in t+1; the parity of the incoming address is checked and
// a bad one flagged on `par_err` one cycle later. A separate load port
// (prog_we/prog_addr/prog_data) fills the memory; the parity is generated
// on loading. The document uses a "safe memory" whose internals it does
// not describe; the load port and depth are this design's choices. The
// address is taken modulo DEPTH.
module safe_imem #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] addr,
  input  logic         addr_par,
  output logic [W-1:0] rdata,
  output logic         rpar,
  output logic         par_err,
  input  logic         prog_we,
  input  logic [W-1:0] prog_addr,
  input  logic [W-1:0] prog_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (prog_we) mem[prog_addr[AW-1:0]] <= {^prog_data, prog_data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {rpar, rdata} <= '0;
      par_err       <= 1'b0;
    end else begin
      if (en) {rpar, rdata} <= mem[addr[AW-1:0]];
      par_err <= en && ((^addr) != addr_par);
    end
  end

endmodule
