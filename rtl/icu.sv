// icu: instruction RAM control unit. Serves the refill requests of both
// instruction caches from the single shared instruction memory.
//
// Each core has its own burst_fsm (core 2's runs on core 2's clock) that
// turns a cache miss into four word reads. The outgoing address passes an
// out_bus_route (per-core parity, lock-mode comparison, output
// multiplexer); the returning instruction word passes an in_bus_route
// (direct to cache 1, 1.5-cycle delayed or direct to cache 2, parity
// checked on both branches).
//
// Lock mode: only core 1's requests reach the memory; each returned word
// goes to cache 1 at once and to cache 2 1.5 cycles later, and core 2's
// burst machine is paced by core 1's grants, delayed by 1.5 cycles. The
// miss requests and burst addresses of the two cores are compared.
// Split mode: both burst machines compete through access_arbiter (core 1
// first, core 2 first right after a core 1 access) and each gets its own
// words back.
//
// Memory timing: a request granted in cycle t is presented to the memory
// in t (address, enable); the word and its parity come back in t+1.
// Error outputs (alternating dual-rail): err_perf_dr covers the two parity
// checkers, err_safe_dr adds the comparator; the mode switch unit selects.
// The structure follows the document; widths and timing are this design's.
module icu #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         clk2,       // core 2 clock
  input  logic         rst_n,
  input  logic         rst2_n,     // reset of the core 2 clock domain
  input  logic         lock,
  input  logic         alt,
  // cache 1
  input  logic         miss_req1,
  input  logic [W-3:0] miss_blk1,
  output logic         fill_valid1,
  output logic [1:0]   fill_idx1,
  output logic [W-1:0] fill_data1,
  // cache 2
  input  logic         miss_req2,
  input  logic [W-3:0] miss_blk2,
  output logic         fill_valid2,
  output logic [1:0]   fill_idx2,
  output logic [W-1:0] fill_data2,
  // instruction memory
  output logic         imem_en,
  output logic [W-1:0] imem_addr,
  output logic         imem_addr_par,
  input  logic [W-1:0] imem_rdata,
  input  logic         imem_rpar,
  // error signals
  output logic [1:0]   err_safe_dr,
  output logic [1:0]   err_perf_dr,
  // arbitration conflict (both cores requested in the same cycle)
  output logic         conflict
);

  logic         mreq1, mreq2, gnt1, gnt2, agnt2, gnt1_d;
  logic [W-1:0] maddr1, maddr2;
  logic         ctrl_out;
  logic [1:0]   cmp_dr, pc1_dr, pc2_dr;
  logic         rtn_valid, rtn_core2, par1_unused, par2_unused;
  logic [1:0]   rtn_idx;

  burst_fsm #(.W(W)) u_b1 (
    .clk(clk), .rst_n(rst_n), .miss_req(miss_req1), .miss_blk(miss_blk1),
    .gnt(gnt1), .mem_req(mreq1), .mem_addr(maddr1)
  );

  burst_fsm #(.W(W)) u_b2 (
    .clk(clk2), .rst_n(rst2_n), .miss_req(miss_req2), .miss_blk(miss_blk2),
    .gnt(gnt2), .mem_req(mreq2), .mem_addr(maddr2)
  );

  access_arbiter u_arb (
    .clk(clk), .rst_n(rst_n), .req1(mreq1), .req2(mreq2 && !lock),
    .gnt1(gnt1), .gnt2(agnt2)
  );

  assign conflict = !lock && mreq1 && mreq2;

  delay_1p5 #(.W(1)) u_gdly (.clk(clk), .rst_n(rst_n), .d(gnt1), .q(gnt1_d));
  assign gnt2 = lock ? gnt1_d : agnt2;

  out_bus_route #(.W(W), .CW(1)) u_out (
    .clk(clk), .rst_n(rst_n), .lock(lock), .alt(alt), .sel2(agnt2),
    .word1(maddr1), .ctrl1(miss_req1), .act1(mreq1),
    .word2(maddr2), .ctrl2(miss_req2), .act2(mreq2),
    .word_out(imem_addr), .par_out(imem_addr_par), .ctrl_out(ctrl_out),
    .cmp_dr(cmp_dr)
  );

  assign imem_en = gnt1 || agnt2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rtn_valid <= 1'b0;
      rtn_core2 <= 1'b0;
      rtn_idx   <= '0;
    end else begin
      rtn_valid <= imem_en;
      rtn_core2 <= agnt2;
      rtn_idx   <= imem_addr[1:0];
    end

  in_bus_route #(.W(W), .SBW(3)) u_in (
    .clk(clk), .rst_n(rst_n), .lock(lock), .alt(alt),
    .data(imem_rdata), .par(imem_rpar),
    .sb1({rtn_valid && !rtn_core2, rtn_idx}),
    .sb2({rtn_valid &&  rtn_core2, rtn_idx}),
    .data1(fill_data1), .par1(par1_unused), .sb1_out({fill_valid1, fill_idx1}),
    .data2(fill_data2), .par2(par2_unused), .sb2_out({fill_valid2, fill_idx2}),
    .err1_dr(pc1_dr), .err2_dr(pc2_dr)
  );

  two_rail_checker #(.N(2)) u_trc_p (.in({pc1_dr, pc2_dr}), .alt(alt), .out(err_perf_dr));
  two_rail_checker #(.N(3)) u_trc_s (.in({pc1_dr, pc2_dr, cmp_dr}), .alt(alt), .out(err_safe_dr));

endmodule
