// icache: direct-mapped instruction cache of one core, 4-word blocks,
// with a per-line "loaded in lock mode" flag.
//
// Lookup is combinational: the core presents `addr`, the cache answers
// with `instr` and `instr_valid` in the same cycle. On a miss the cache
// latches the block address, raises `miss_req` and writes the four words
// delivered on the fill port (`fill_valid`, word index `fill_idx`) into the
// line; when all four have arrived the line becomes valid and `miss_req`
// drops.
//
// Lock-mode consistency (document): every line carries a flag that is set
// when the line is loaded in lock mode and cleared when that line is
// reloaded in split mode by either core. In lock mode a line only hits if
// its flag is set, so the two caches, which then see the same refills,
// always hit and miss together. The other core's split-mode refills arrive
// on `clr_valid`/`clr_line`; this cache reports its own on `own_clr_*`.
// Each cache keeps its own copy of the flags; the document describes a
// single list.
//
// An instruction that was already hitting when the mode changed keeps
// hitting while the core stays on it (`addr` unchanged). Without this the
// halted mode switch instruction itself would turn into a lock-mode miss.
// Line count, direct mapping and this rule are this design's choices.
module icache #(
  parameter int unsigned W     = 16,
  parameter int unsigned LINES = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     lock,
  // core side
  input  logic [W-1:0]             addr,
  output logic [W-1:0]             instr,
  output logic                     instr_valid,
  // refill request to the instruction RAM control unit
  output logic                     miss_req,
  output logic [W-3:0]             miss_blk,
  // refill data
  input  logic                     fill_valid,
  input  logic [1:0]               fill_idx,
  input  logic [W-1:0]             fill_data,
  // lock-mode flag maintenance
  input  logic                     clr_valid,
  input  logic [$clog2(LINES)-1:0] clr_line,
  output logic                     own_clr_valid,
  output logic [$clog2(LINES)-1:0] own_clr_line
);

  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = W - 2 - IW;

  typedef logic [IW-1:0] idx_t;
  typedef logic [TW-1:0] tag_t;

  logic [W-1:0] data_q [LINES][4];
  tag_t         tag_q  [LINES];
  logic [LINES-1:0] valid_q, sflag_q;

  logic         busy;       // refill in progress
  logic [W-3:0] blk_q;
  logic [3:0]   got;
  logic [W-1:0] last_addr;
  logic         last_hit;

  idx_t idx, fidx;
  tag_t tag;
  logic hit, last_word;

  assign idx  = addr[2 +: IW];
  assign tag  = addr[W-1 -: TW];
  assign fidx = blk_q[IW-1:0];

  assign hit = !busy && valid_q[idx] && (tag_q[idx] == tag) &&
               (!lock || sflag_q[idx] || (last_hit && last_addr == addr));

  assign instr       = data_q[idx][addr[1:0]];
  assign instr_valid = hit;
  assign miss_req    = busy;
  assign miss_blk    = blk_q;

  assign last_word     = busy && fill_valid && ((got | (4'b1 << fill_idx)) == 4'hF);
  assign own_clr_valid = last_word && !lock;
  assign own_clr_line  = fidx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      blk_q     <= '0;
      got       <= '0;
      valid_q   <= '0;
      sflag_q   <= '0;
      last_addr <= '0;
      last_hit  <= 1'b0;
    end else begin
      last_addr <= addr;
      last_hit  <= hit;
      if (clr_valid && !lock) sflag_q[clr_line] <= 1'b0;
      if (!busy) begin
        if (!hit) begin
          busy         <= 1'b1;
          blk_q        <= addr[W-1:2];
          got          <= '0;
          valid_q[idx] <= 1'b0;
        end
      end else if (fill_valid) begin
        got[fill_idx] <= 1'b1;
        if (last_word) begin
          busy          <= 1'b0;
          valid_q[fidx] <= 1'b1;
          sflag_q[fidx] <= lock;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy && fill_valid) data_q[fidx][fill_idx] <= fill_data;
    if (last_word) tag_q[fidx] <= blk_q[W-3 -: TW];
  end

endmodule
