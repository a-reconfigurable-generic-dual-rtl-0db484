// dual_core_frame: reconfigurable frame around two 16-bit Harvard cores.
//
// The frame lets two identical cores run either as a master/checker pair
// (lock mode, the safety mode) or as two independent processors (split
// mode, the performance mode), and switches between the two at run time
// when both cores have executed the mode switching instruction. The cores
// themselves are outside: their buses are this module's c1_* and c2_*
// ports. The frame holds the shared instruction and data memories, one
// instruction cache and one mode switch detect unit per core, the
// instruction RAM control unit (icu), the data RAM control unit (dcu), the
// mode switch unit and the dual-rail input stages for interrupt and reset.
//
// Clocks: core 1 and the shared logic use `clk`. Core 2 and its cache use
// c2_clk, which the mode switch unit derives from `clk`: inverted in lock
// mode (core 2 then runs 1.5 cycles behind core 1) and in phase in split
// mode. The frame logic of core 2's clock domain leaves reset 1.5 cycles
// after that of core 1.
//
// Resets: rst_n resets everything. A core reset arriving on the dual-rail
// reset pins (crst_t/crst_f) resets both cores and all frame logic except
// the memories and the input stages, so the pair always restarts in lock
// mode as after power-up (document: the system restarts in safety mode
// after a reset); core 2 leaves reset 1.5 cycles after core 1.
//
// Core ports, per core n:
//   cn_iaddr in, cn_instr/cn_instr_valid out: instruction fetch (same cycle)
//   cn_wait out: halt (mode switch); cn_message out: mode switch interrupt
//   cn_irq out: external interrupt; cn_rst out: core reset (active high)
//   cn_dreq in; cn_dgnt, cn_drvalid, cn_drdata out: data access (see dcu)
// The core is expected to stall while !cn_instr_valid or cn_wait.
//
// Outputs for the outside world: core_mode_dr (dual-rail, 10 = lock,
// 01 = split, meant to trigger an external watchdog), error_dr
// (alternating dual-rail: 01/10 healthy, 00/11 error), input_err_dr
// (rail disagreement on the interrupt and reset inputs), memory parity
// and write-protection flags. prog_* loads the instruction memory.
//
// The block structure follows the document; all widths, timings, the
// memory sizes and the load port are this design's choices.
module dual_core_frame
  import dcf_pkg::*;
#(
  parameter int unsigned W           = 16,
  parameter int unsigned CACHE_LINES = 16,
  parameter int unsigned IMEM_DEPTH  = 1024,
  parameter int unsigned DMEM_DEPTH  = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  // dual-rail external interrupt and core reset
  input  logic         irq_t,
  input  logic         irq_f,
  input  logic         crst_t,
  input  logic         crst_f,
  // core 1
  output logic         c1_clk,
  output logic         c1_rst,
  input  logic [W-1:0] c1_iaddr,
  output logic [W-1:0] c1_instr,
  output logic         c1_instr_valid,
  output logic         c1_wait,
  output logic         c1_message,
  output logic         c1_irq,
  input  dreq_t        c1_dreq,
  output logic         c1_dgnt,
  output logic         c1_drvalid,
  output logic [W-1:0] c1_drdata,
  // core 2
  output logic         c2_clk,
  output logic         c2_rst,
  input  logic [W-1:0] c2_iaddr,
  output logic [W-1:0] c2_instr,
  output logic         c2_instr_valid,
  output logic         c2_wait,
  output logic         c2_message,
  output logic         c2_irq,
  input  dreq_t        c2_dreq,
  output logic         c2_dgnt,
  output logic         c2_drvalid,
  output logic [W-1:0] c2_drdata,
  // instruction memory load port
  input  logic         prog_we,
  input  logic [W-1:0] prog_addr,
  input  logic [W-1:0] prog_data,
  // status
  output logic [1:0]   core_mode_dr,
  output logic [1:0]   error_dr,
  output logic [1:0]   input_err_dr,
  output logic         imem_par_err,
  output logic         dmem_par_err,
  output logic         dmem_wp_hit,
  output logic         icu_conflict,
  output logic         dcu_conflict,
  output logic         sem_block,
  output logic         id_read
);

  localparam int unsigned IW = $clog2(CACHE_LINES);

  logic         clk2, rst2_n, lock, alt;
  logic         sig1, sig2;
  logic [1:0]   es_icu, ep_icu, es_dcu, ep_dcu, irq_err, rst_err;
  logic         c1rst_raw, c2rst_raw;
  logic         frst_n;       // frame reset: system reset or core reset
  // caches
  logic         mreq1, mreq2, fv1, fv2;
  logic [W-3:0] mblk1, mblk2;
  logic [1:0]   fi1, fi2;
  logic [W-1:0] fd1, fd2;
  logic         oc1_v, oc2_v;
  logic [IW-1:0] oc1_l, oc2_l;
  // memories
  logic         ien, iapar, irpar;
  logic [W-1:0] iaddr, irdata;
  logic         den, dwe, dapar, dwpar, drpar;
  logic [W-1:0] daddr, dwdata, drdata;

  // Core 2 clock domain reset: released 1.5 cycles after core 1's domain.
  delay_1p5 #(.W(1)) u_rst2 (.clk(clk), .rst_n(frst_n), .d(1'b1), .q(rst2_n));

  mode_switch_unit u_msu (
    .clk(clk), .rst_n(frst_n),
    .core1_signal(sig1), .core2_signal(sig2),
    .err_safe_icu(es_icu), .err_perf_icu(ep_icu),
    .err_safe_dcu(es_dcu), .err_perf_dcu(ep_dcu),
    .wait1(c1_wait), .wait2(c2_wait),
    .message1(c1_message), .message2(c2_message),
    .clk_core2(clk2), .lock(lock),
    .core_mode_dr(core_mode_dr), .error_dr(error_dr), .alt(alt)
  );

  assign c1_clk = clk;
  assign c2_clk = clk2;

  single_bit_input #(.ALWAYS_DELAY(1'b0)) u_irq (
    .clk(clk), .rst_n(rst_n), .lock(lock), .alt(alt), .sig_t(irq_t), .sig_f(irq_f),
    .to_core1(c1_irq), .to_core2(c2_irq), .err_dr(irq_err)
  );

  single_bit_input #(.ALWAYS_DELAY(1'b1)) u_rst (
    .clk(clk), .rst_n(rst_n), .lock(lock), .alt(alt), .sig_t(crst_t), .sig_f(crst_f),
    .to_core1(c1rst_raw), .to_core2(c2rst_raw), .err_dr(rst_err)
  );

  // A core reset from the reset pins restarts the whole frame, in lock mode.
  assign frst_n = rst_n && !c1rst_raw;
  assign c1_rst = !frst_n;
  assign c2_rst = !rst2_n || c2rst_raw;

  two_rail_checker #(.N(2)) u_trc_in (.in({irq_err, rst_err}), .alt(alt), .out(input_err_dr));

  icache #(.W(W), .LINES(CACHE_LINES)) u_cache1 (
    .clk(clk), .rst_n(frst_n), .lock(lock),
    .addr(c1_iaddr), .instr(c1_instr), .instr_valid(c1_instr_valid),
    .miss_req(mreq1), .miss_blk(mblk1),
    .fill_valid(fv1), .fill_idx(fi1), .fill_data(fd1),
    .clr_valid(oc2_v), .clr_line(oc2_l), .own_clr_valid(oc1_v), .own_clr_line(oc1_l)
  );

  icache #(.W(W), .LINES(CACHE_LINES)) u_cache2 (
    .clk(clk2), .rst_n(rst2_n), .lock(lock),
    .addr(c2_iaddr), .instr(c2_instr), .instr_valid(c2_instr_valid),
    .miss_req(mreq2), .miss_blk(mblk2),
    .fill_valid(fv2), .fill_idx(fi2), .fill_data(fd2),
    .clr_valid(oc1_v), .clr_line(oc1_l), .own_clr_valid(oc2_v), .own_clr_line(oc2_l)
  );

  mode_switch_detect u_msd1 (.instr(c1_instr), .instr_valid(c1_instr_valid), .core_signal(sig1));
  mode_switch_detect u_msd2 (.instr(c2_instr), .instr_valid(c2_instr_valid), .core_signal(sig2));

  icu #(.W(W)) u_icu (
    .clk(clk), .clk2(clk2), .rst_n(frst_n), .rst2_n(rst2_n), .lock(lock), .alt(alt),
    .miss_req1(mreq1), .miss_blk1(mblk1), .fill_valid1(fv1), .fill_idx1(fi1), .fill_data1(fd1),
    .miss_req2(mreq2), .miss_blk2(mblk2), .fill_valid2(fv2), .fill_idx2(fi2), .fill_data2(fd2),
    .imem_en(ien), .imem_addr(iaddr), .imem_addr_par(iapar),
    .imem_rdata(irdata), .imem_rpar(irpar),
    .err_safe_dr(es_icu), .err_perf_dr(ep_icu), .conflict(icu_conflict)
  );

  safe_imem #(.W(W), .DEPTH(IMEM_DEPTH)) u_imem (
    .clk(clk), .rst_n(rst_n), .en(ien && frst_n), .addr(iaddr), .addr_par(iapar),
    .rdata(irdata), .rpar(irpar), .par_err(imem_par_err),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data)
  );

  dcu #(.W(W)) u_dcu (
    .clk(clk), .rst_n(frst_n), .lock(lock), .alt(alt),
    .c1_req(c1_dreq), .c1_gnt(c1_dgnt), .c1_rvalid(c1_drvalid), .c1_rdata(c1_drdata),
    .c2_req(c2_dreq), .c2_gnt(c2_dgnt), .c2_rvalid(c2_drvalid), .c2_rdata(c2_drdata),
    .dmem_en(den), .dmem_we(dwe), .dmem_addr(daddr), .dmem_addr_par(dapar),
    .dmem_wdata(dwdata), .dmem_wpar(dwpar), .dmem_rdata(drdata), .dmem_rpar(drpar),
    .err_safe_dr(es_dcu), .err_perf_dr(ep_dcu),
    .conflict(dcu_conflict), .sem_block(sem_block), .id_read(id_read)
  );

  safe_dmem #(.W(W), .DEPTH(DMEM_DEPTH)) u_dmem (
    .clk(clk), .rst_n(rst_n), .core_mode_dr(core_mode_dr),
    .en(den && frst_n), .we(dwe), .addr(daddr), .addr_par(dapar), .wdata(dwdata), .wpar(dwpar),
    .rdata(drdata), .rpar(drpar), .par_err(dmem_par_err), .wp_hit(dmem_wp_hit)
  );

endmodule
