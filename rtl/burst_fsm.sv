// burst_fsm: address sequence generator for one instruction cache refill.
//
// When the cache raises `miss_req` with a block address, the machine
// requests the four words of the block in order (base + 0 .. base + 3),
// moving to the next word each time `gnt` is seen at a clock edge. After
// the fourth grant it waits for the cache to drop `miss_req` (the last word
// has arrived) before it accepts a new miss. One instance exists per core,
// clocked with that core's clock, so that in lock mode the two sequences
// can be compared (document). Starting the burst at the block base, not at
// the missing word, is this design's choice.
module burst_fsm #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         miss_req,
  input  logic [W-3:0] miss_blk,
  input  logic         gnt,
  output logic         mem_req,
  output logic [W-1:0] mem_addr
);

  typedef enum logic [1:0] {IDLE, BURST, DONE} state_e;

  state_e       state;
  logic [W-3:0] blk;
  logic [1:0]   cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      blk   <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        IDLE:  if (miss_req) begin
                 state <= BURST;
                 blk   <= miss_blk;
                 cnt   <= '0;
               end
        BURST: if (gnt) begin
                 cnt <= cnt + 2'd1;
                 if (cnt == 2'd3) state <= DONE;
               end
        DONE:  if (!miss_req) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign mem_req  = (state == BURST);
  assign mem_addr = {blk, cnt};

endmodule
