// dcu: data RAM control unit. Gives both cores access to the shared data
// memory and memory mapped peripherals, provides the core identification
// bit and a semaphore for locking the data memory.
//
// Core protocol (per core): the core holds req/we/addr/wdata until it sees
// `gnt` at a clock edge; for a read, `rvalid` and `rdata` follow in the
// next cycle. Memory side: enable, write enable, address and write data,
// each word with its own even parity; the read word returns one cycle
// later with its parity.
//
// Lock mode: only core 1's accesses are performed. Core 2's requests are
// only compared with core 1's (delayed by 1.5 cycles, through
// out_bus_route); core 2 receives core 1's grant and read data delayed by
// 1.5 cycles (in_bus_route). Split mode: both cores compete through
// access_arbiter, and each gets its own grant and data.
//
// Memory mapped registers, handled here and never sent to the memory:
//   ID_ADDR  (0xFFF8) reads 0 for core 1 and 1 for core 2 (document);
//            the word carries its parity like any memory word.
//   SEM_ADDR (0xFFF9) split mode only. Writing 1 locks the data memory for
//            the writing core, writing 0 releases it. While one core holds
//            the lock, every access of the other core except to ID_ADDR is
//            held off (no grant) until it is released. Reading returns
//            bit 0 = held by the reader, bit 1 = held by the other core.
//            The lock is dropped in lock mode.
// The semaphore address and encoding and the hold-off behaviour are this
// design's choices. Error outputs as in icu: err_perf_dr = parity
// checkers, err_safe_dr adds the address and write data comparators.
module dcu #(
  parameter int unsigned W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 lock,
  input  logic                 alt,
  input  dcf_pkg::dreq_t       c1_req,
  output logic                 c1_gnt,
  output logic                 c1_rvalid,
  output logic [W-1:0]         c1_rdata,
  input  dcf_pkg::dreq_t       c2_req,
  output logic                 c2_gnt,
  output logic                 c2_rvalid,
  output logic [W-1:0]         c2_rdata,
  // data memory
  output logic                 dmem_en,
  output logic                 dmem_we,
  output logic [W-1:0]         dmem_addr,
  output logic                 dmem_addr_par,
  output logic [W-1:0]         dmem_wdata,
  output logic                 dmem_wpar,
  input  logic [W-1:0]         dmem_rdata,
  input  logic                 dmem_rpar,
  // error signals
  output logic [1:0]           err_safe_dr,
  output logic [1:0]           err_perf_dr,
  // observation
  output logic                 conflict,    // both cores requested
  output logic                 sem_block,   // an access held off by the semaphore
  output logic                 id_read      // a read of the identification bit
);

  import dcf_pkg::*;

  logic         ok1, ok2, r1, r2, g1, ag2, g1_d, sel_core2;
  logic         sem1, sem2;
  logic [1:0]   ctrl_a;
  logic         ctrl_d;
  logic [1:0]   cmpa_dr, cmpd_dr, pc1_dr, pc2_dr;
  logic         special, is_id, is_sem;
  // return path
  logic         rv, rv_core2, rv_special;
  logic [W-1:0] rv_sdata;
  logic [W-1:0] ret_data;
  logic         ret_par, par1_unused, par2_unused;

  // Semaphore hold-off (split mode only).
  assign ok1 = !sem2 || (c1_req.addr == ID_ADDR);
  assign ok2 = !sem1 || (c2_req.addr == ID_ADDR);
  assign r1  = c1_req.req && (lock || ok1);
  assign r2  = c2_req.req && !lock && ok2;

  assign sem_block = !lock && ((c1_req.req && !ok1) || (c2_req.req && !ok2));
  assign conflict  = r1 && r2;

  access_arbiter u_arb (.clk(clk), .rst_n(rst_n), .req1(r1), .req2(r2), .gnt1(g1), .gnt2(ag2));

  delay_1p5 #(.W(1)) u_gdly (.clk(clk), .rst_n(rst_n), .d(g1), .q(g1_d));

  assign c1_gnt    = g1;
  assign c2_gnt    = lock ? g1_d : ag2;
  assign sel_core2 = ag2;

  out_bus_route #(.W(W), .CW(2)) u_oa (
    .clk(clk), .rst_n(rst_n), .lock(lock), .alt(alt), .sel2(sel_core2),
    .word1(c1_req.addr), .ctrl1({c1_req.req, c1_req.we}), .act1(c1_req.req),
    .word2(c2_req.addr), .ctrl2({c2_req.req, c2_req.we}), .act2(c2_req.req),
    .word_out(dmem_addr), .par_out(dmem_addr_par), .ctrl_out(ctrl_a), .cmp_dr(cmpa_dr)
  );

  out_bus_route #(.W(W), .CW(1)) u_od (
    .clk(clk), .rst_n(rst_n), .lock(lock), .alt(alt), .sel2(sel_core2),
    .word1(c1_req.wdata), .ctrl1(c1_req.we), .act1(c1_req.req && c1_req.we),
    .word2(c2_req.wdata), .ctrl2(c2_req.we), .act2(c2_req.req && c2_req.we),
    .word_out(dmem_wdata), .par_out(dmem_wpar), .ctrl_out(ctrl_d), .cmp_dr(cmpd_dr)
  );

  assign is_id   = (dmem_addr == ID_ADDR);
  assign is_sem  = (dmem_addr == SEM_ADDR);
  assign special = is_id || is_sem;

  assign dmem_en = (g1 || ag2) && !special;
  assign dmem_we = ctrl_a[0];
  assign id_read = (g1 || ag2) && is_id && !ctrl_a[0];

  // Semaphore state.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sem1 <= 1'b0;
      sem2 <= 1'b0;
    end else if (lock) begin
      sem1 <= 1'b0;
      sem2 <= 1'b0;
    end else if (is_sem && ctrl_a[0]) begin
      if (g1)  sem1 <= dmem_wdata[0];
      if (ag2) sem2 <= dmem_wdata[0];
    end
  end

  // Return path: remember who read and what a special register returns.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rv         <= 1'b0;
      rv_core2   <= 1'b0;
      rv_special <= 1'b0;
      rv_sdata   <= '0;
    end else begin
      rv         <= (g1 || ag2) && !ctrl_a[0];
      rv_core2   <= ag2;
      rv_special <= special;
      if (is_id)       rv_sdata <= {{(W-1){1'b0}}, ag2};
      else             rv_sdata <= {{(W-2){1'b0}}, ag2 ? sem1 : sem2, ag2 ? sem2 : sem1};
    end
  end

  assign ret_data = rv_special ? rv_sdata : dmem_rdata;
  assign ret_par  = rv_special ? ^rv_sdata : dmem_rpar;

  in_bus_route #(.W(W), .SBW(1)) u_in (
    .clk(clk), .rst_n(rst_n), .lock(lock), .alt(alt),
    .data(ret_data), .par(ret_par),
    .sb1(rv && !rv_core2), .sb2(rv && rv_core2),
    .data1(c1_rdata), .par1(par1_unused), .sb1_out(c1_rvalid),
    .data2(c2_rdata), .par2(par2_unused), .sb2_out(c2_rvalid),
    .err1_dr(pc1_dr), .err2_dr(pc2_dr)
  );

  two_rail_checker #(.N(2)) u_trc_p (.in({pc1_dr, pc2_dr}), .alt(alt), .out(err_perf_dr));
  two_rail_checker #(.N(4)) u_trc_s (.in({pc1_dr, pc2_dr, cmpa_dr, cmpd_dr}), .alt(alt), .out(err_safe_dr));

endmodule
