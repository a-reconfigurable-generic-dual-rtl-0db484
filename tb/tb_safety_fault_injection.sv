// tb_safety_fault_injection: stuck-at fault campaign on the frame in
// lock (safety) mode, at the frame's default parameters.
//
// Two complete systems run side by side: a golden one and a device under
// test, each a dual_core_frame with two behavioural cores, loaded with the
// same program (a loop of stores, loads and arithmetic on the protected
// data area). For every fault the device under test gets one permanent
// stuck-at-0 or stuck-at-1 on one bit of one of the buses between its
// cores and the frame: instruction addresses, instructions, data
// addresses, write data, read data, request/write strobes and the stall
// and grant lines, for both cores. Both systems are reset, and then
// run for RUN_CYCLES cycles.
//
// Each cycle (sampled on the falling clock edge) the device under test's
// data memory bus (enable, write enable, address, write data) is compared
// with the golden one: a difference is an effect. Detection is any error
// output: error_dr not a valid alternating codeword, or a parity error at
// either memory. Every fault must end in one of: not activated (neither
// effect nor detection), detected without effect, or detected no later
// than two clock cycles after its first effect. A fault with an
// undetected or late-detected effect counts as a failure. The golden
// system must never signal an error. Faults on core 2's buses must never
// have an effect, since in lock mode core 2's outputs only feed the
// comparators.
//
// The fault sites are this testbench's selection: the signals that the
// frame's comparators and parity checks are meant to cover. Faults inside
// the frame's own gates are not injected.
module tb_safety_fault_injection;
  timeunit 1ns;
  timeprecision 1ps;
  import dcf_pkg::*;

  localparam time TCK        = 10ns;
  localparam int  RUN_CYCLES = 300;
  localparam int  N_SITES    = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(TCK/2) clk = ~clk;

  logic        prog_we = 1'b0;
  logic [15:0] prog_addr = '0, prog_data = '0;

  // ---- fault descriptor ------------------------------------------------
  int          f_site = -1;   // -1: no fault
  int          f_bit  = 0;
  logic        f_val  = 1'b0;

  function automatic int site_width(input int s);
    if (s < 10) return 16;
    if (s < 12) return 2;
    return 4;
  endfunction

  function automatic string site_name(input int s);
    case (s)
      0: return "core 1 instruction address";  1: return "core 2 instruction address";
      2: return "core 1 instruction";          3: return "core 2 instruction";
      4: return "core 1 data address";         5: return "core 2 data address";
      6: return "core 1 write data";           7: return "core 2 write data";
      8: return "core 1 read data";            9: return "core 2 read data";
      10: return "core 1 req/we";              11: return "core 2 req/we";
      12: return "core 1 valid/wait/gnt/rvalid";
      default: return "core 2 valid/wait/gnt/rvalid";
    endcase
  endfunction

  function automatic logic [15:0] inj(input logic [15:0] x, input int s);
    if (f_site != s) return x;
    return f_val ? (x | (16'h1 << f_bit)) : (x & ~(16'h1 << f_bit));
  endfunction

  // ---- golden system ---------------------------------------------------
  logic        g1_rst, g1_iv, g1_wait, g1_msg, g1_irq, g1_dgnt, g1_drv, g1_clk;
  logic        g2_rst, g2_iv, g2_wait, g2_msg, g2_irq, g2_dgnt, g2_drv, g2_clk;
  logic [15:0] g1_iaddr, g1_instr, g1_drd, g2_iaddr, g2_instr, g2_drd;
  dreq_t       g1_dreq, g2_dreq;
  logic [1:0]  g_mode, g_err, g_inerr;
  logic        g_ipe, g_dpe, g_wp, g_icf, g_dcf, g_sem, g_id;

  dual_core_frame gold (
    .clk(clk), .rst_n(rst_n), .irq_t(1'b0), .irq_f(1'b1), .crst_t(1'b0), .crst_f(1'b1),
    .c1_clk(g1_clk), .c1_rst(g1_rst), .c1_iaddr(g1_iaddr), .c1_instr(g1_instr),
    .c1_instr_valid(g1_iv), .c1_wait(g1_wait), .c1_message(g1_msg), .c1_irq(g1_irq),
    .c1_dreq(g1_dreq), .c1_dgnt(g1_dgnt), .c1_drvalid(g1_drv), .c1_drdata(g1_drd),
    .c2_clk(g2_clk), .c2_rst(g2_rst), .c2_iaddr(g2_iaddr), .c2_instr(g2_instr),
    .c2_instr_valid(g2_iv), .c2_wait(g2_wait), .c2_message(g2_msg), .c2_irq(g2_irq),
    .c2_dreq(g2_dreq), .c2_dgnt(g2_dgnt), .c2_drvalid(g2_drv), .c2_drdata(g2_drd),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .core_mode_dr(g_mode), .error_dr(g_err), .input_err_dr(g_inerr),
    .imem_par_err(g_ipe), .dmem_par_err(g_dpe), .dmem_wp_hit(g_wp),
    .icu_conflict(g_icf), .dcu_conflict(g_dcf), .sem_block(g_sem), .id_read(g_id)
  );

  core_model u_g1 (
    .clk(g1_clk), .rst(g1_rst), .iaddr(g1_iaddr), .instr(g1_instr), .instr_valid(g1_iv),
    .wait_i(g1_wait), .irq(g1_msg), .xirq(g1_irq), .dreq(g1_dreq), .dgnt(g1_dgnt),
    .drvalid(g1_drv), .drdata(g1_drd), .fault(1'b0)
  );
  core_model u_g2 (
    .clk(g2_clk), .rst(g2_rst), .iaddr(g2_iaddr), .instr(g2_instr), .instr_valid(g2_iv),
    .wait_i(g2_wait), .irq(g2_msg), .xirq(g2_irq), .dreq(g2_dreq), .dgnt(g2_dgnt),
    .drvalid(g2_drv), .drdata(g2_drd), .fault(1'b0)
  );

  // ---- device under test, with fault sites between cores and frame ------
  // core side (k*) and frame side (f*) of each core's buses
  logic        k1_iv, k1_wait, k1_dgnt, k1_drv, k2_iv, k2_wait, k2_dgnt, k2_drv;
  logic        f1_iv, f1_wait, f1_dgnt, f1_drv, f2_iv, f2_wait, f2_dgnt, f2_drv;
  logic [15:0] k1_iaddr, k1_instr, k1_drd, k2_iaddr, k2_instr, k2_drd;
  logic [15:0] f1_iaddr, f1_instr, f1_drd, f2_iaddr, f2_instr, f2_drd;
  dreq_t       k1_dreq, k2_dreq, f1_dreq, f2_dreq;
  logic        d1_rst, d1_msg, d1_irq, d1_clk, d2_rst, d2_msg, d2_irq, d2_clk;
  logic [1:0]  d_mode, d_err, d_inerr;
  logic        d_ipe, d_dpe, d_wp, d_icf, d_dcf, d_sem, d_id;
  logic [15:0] s1_ctl, s2_ctl, s1_st, s2_st;

  always_comb begin
    f1_iaddr = inj(k1_iaddr, 0);
    f2_iaddr = inj(k2_iaddr, 1);
    k1_instr = inj(f1_instr, 2);
    k2_instr = inj(f2_instr, 3);
    f1_dreq  = k1_dreq;
    f2_dreq  = k2_dreq;
    f1_dreq.addr  = inj(k1_dreq.addr, 4);
    f2_dreq.addr  = inj(k2_dreq.addr, 5);
    f1_dreq.wdata = inj(k1_dreq.wdata, 6);
    f2_dreq.wdata = inj(k2_dreq.wdata, 7);
    k1_drd = inj(f1_drd, 8);
    k2_drd = inj(f2_drd, 9);
    s1_ctl = inj({14'b0, k1_dreq.we, k1_dreq.req}, 10);
    s2_ctl = inj({14'b0, k2_dreq.we, k2_dreq.req}, 11);
    {f1_dreq.we, f1_dreq.req} = s1_ctl[1:0];
    {f2_dreq.we, f2_dreq.req} = s2_ctl[1:0];
    s1_st = inj({12'b0, f1_drv, f1_dgnt, f1_wait, f1_iv}, 12);
    s2_st = inj({12'b0, f2_drv, f2_dgnt, f2_wait, f2_iv}, 13);
    {k1_drv, k1_dgnt, k1_wait, k1_iv} = s1_st[3:0];
    {k2_drv, k2_dgnt, k2_wait, k2_iv} = s2_st[3:0];
  end

  dual_core_frame dut (
    .clk(clk), .rst_n(rst_n), .irq_t(1'b0), .irq_f(1'b1), .crst_t(1'b0), .crst_f(1'b1),
    .c1_clk(d1_clk), .c1_rst(d1_rst), .c1_iaddr(f1_iaddr), .c1_instr(f1_instr),
    .c1_instr_valid(f1_iv), .c1_wait(f1_wait), .c1_message(d1_msg), .c1_irq(d1_irq),
    .c1_dreq(f1_dreq), .c1_dgnt(f1_dgnt), .c1_drvalid(f1_drv), .c1_drdata(f1_drd),
    .c2_clk(d2_clk), .c2_rst(d2_rst), .c2_iaddr(f2_iaddr), .c2_instr(f2_instr),
    .c2_instr_valid(f2_iv), .c2_wait(f2_wait), .c2_message(d2_msg), .c2_irq(d2_irq),
    .c2_dreq(f2_dreq), .c2_dgnt(f2_dgnt), .c2_drvalid(f2_drv), .c2_drdata(f2_drd),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .core_mode_dr(d_mode), .error_dr(d_err), .input_err_dr(d_inerr),
    .imem_par_err(d_ipe), .dmem_par_err(d_dpe), .dmem_wp_hit(d_wp),
    .icu_conflict(d_icf), .dcu_conflict(d_dcf), .sem_block(d_sem), .id_read(d_id)
  );

  core_model u_d1 (
    .clk(d1_clk), .rst(d1_rst), .iaddr(k1_iaddr), .instr(k1_instr), .instr_valid(k1_iv),
    .wait_i(k1_wait), .irq(d1_msg), .xirq(d1_irq), .dreq(k1_dreq), .dgnt(k1_dgnt),
    .drvalid(k1_drv), .drdata(k1_drd), .fault(1'b0)
  );
  core_model u_d2 (
    .clk(d2_clk), .rst(d2_rst), .iaddr(k2_iaddr), .instr(k2_instr), .instr_valid(k2_iv),
    .wait_i(k2_wait), .irq(d2_msg), .xirq(d2_irq), .dreq(k2_dreq), .dgnt(k2_dgnt),
    .drvalid(k2_drv), .drdata(k2_drd), .fault(1'b0)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- workload --------------------------------------------------------
  logic [15:0] prog [int];

  function automatic logic [15:0] I(input logic [3:0] op, input logic [3:0] d, input logic [7:0] imm);
    return {op, d, imm};
  endfunction

  initial begin
    prog[0]  = I(1, 1, 8'h40);            // LDL r1,0x40   pointer
    prog[1]  = I(1, 2, 8'h01);            // LDL r2,1
    prog[2]  = I(1, 3, 8'h08);            // LDL r3,8      loop count
    prog[3]  = I(8, 2, 8'h03);            // ADDI r2,3
    prog[4]  = I(4, 2, 8'h01);            // STW r2,[r1]
    prog[5]  = I(3, 4, 8'h01);            // LDW r4,[r1]
    prog[6]  = I(8, 4, 8'h11);            // ADDI r4,0x11
    prog[7]  = I(8, 1, 8'h01);            // ADDI r1,1
    prog[8]  = I(4, 4, 8'h01);            // STW r4,[r1]
    prog[9]  = I(8, 3, 8'hFF);            // ADDI r3,-1
    prog[10] = I(4'hB, 3, 8'd3);          // BNE r3,3
    prog[11] = I(1, 1, 8'h40);            // LDL r1,0x40
    prog[12] = I(1, 3, 8'h08);            // LDL r3,8
    prog[13] = I(7, 0, 8'd3);             // JMP 3
  end

  // ---- per-run observation ----------------------------------------------
  // data memory bus as the memory sees it, don't-care fields cleared
  function automatic logic [33:0] bus(input logic en, input logic we, input logic [15:0] a,
                                     input logic [15:0] wd);
    return {en, en && we, en ? a : 16'h0, (en && we) ? wd : 16'h0};
  endfunction

  bit running = 0;
  int cyc, t_eff, t_det;

  always @(negedge clk) if (running) begin
    cyc++;
    if (t_eff < 0 &&
        (bus(dut.u_dmem.en, dut.u_dmem.we, dut.u_dmem.addr, dut.u_dmem.wdata) !=
         bus(gold.u_dmem.en, gold.u_dmem.we, gold.u_dmem.addr, gold.u_dmem.wdata)))
      t_eff = cyc;
    if (t_det < 0 && (!dr_ok(d_err) || d_ipe || d_dpe)) t_det = cyc;
    if (!dr_ok(g_err) || g_ipe || g_dpe || g_mode != DR_MODE_LOCK) begin
      failures++;
      $display("FAIL: golden system signals an error at %0t", $time);
    end
  end

  // ---- watchdog --------------------------------------------------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_faults = 0, n_inactive = 0, n_det_only = 0, n_det_eff = 0, n_bad = 0;
  int n_golden_stores = 0, worst = 0;
  int n_eff_c1 = 0, n_eff_c2 = 0, n_det_c1 = 0, n_det_c2 = 0;

  task automatic run_one();
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    cyc = 0; t_eff = -1; t_det = -1;
    running = 1;
    rst_n = 1'b1;
    repeat (RUN_CYCLES) @(posedge clk);
    @(negedge clk);
    running = 0;
  endtask

  initial begin
    #1;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      prog_we   = 1'b1;
      prog_addr = 16'(a);
      prog_data = prog.exists(a) ? prog[a] : 16'h0000;
    end
    @(negedge clk) prog_we = 1'b0;

    // fault-free reference run: identical behaviour, no error
    f_site = -1;
    run_one();
    check(t_eff < 0 && t_det < 0, "fault-free run: no effect and no error");
    check(u_g1.r[3] != 16'd0 || u_g1.pc != 16'd0, "workload running");
    check(gold.u_dmem.mem[16'h41][15:0] != 16'h0000, "workload stored data");

    for (int s = 0; s < N_SITES; s++)
      for (int b = 0; b < site_width(s); b++)
        for (int v = 0; v < 2; v++) begin
          f_site = s; f_bit = b; f_val = v[0];
          run_one();
          n_faults++;
          // sites 0, 2, .. belong to core 1, sites 1, 3, .. to core 2
          if (t_eff >= 0) begin if (s % 2 == 0) n_eff_c1++; else n_eff_c2++; end
          if (t_det >= 0) begin if (s % 2 == 0) n_det_c1++; else n_det_c2++; end
          if (t_eff < 0 && t_det < 0) n_inactive++;
          else if (t_eff < 0) n_det_only++;
          else if (t_det >= 0 && t_det <= t_eff + 2) begin
            n_det_eff++;
            if (t_det - t_eff > worst) worst = t_det - t_eff;
          end else begin
            n_bad++;
            $display("fault %s bit %0d stuck-at-%0d: effect at %0d, detection at %0d",
                     site_name(s), b, v, t_eff, t_det);
          end
          check(!(t_eff >= 0 && (t_det < 0 || t_det > t_eff + 2)),
                $sformatf("%s bit %0d stuck-at-%0d detected in time", site_name(s), b, v));
        end

    $display("faults=%0d not_activated=%0d detected_without_effect=%0d detected_within_2=%0d undetected_or_late=%0d worst_latency=%0d",
             n_faults, n_inactive, n_det_only, n_det_eff, n_bad, worst);
    check(n_det_only + n_det_eff > n_faults / 2, "most faults activated by the workload");
    $display("core 1 buses: %0d with effect, %0d detected; core 2 buses: %0d with effect, %0d detected",
             n_eff_c1, n_det_c1, n_eff_c2, n_det_c2);
    check(n_eff_c2 == 0, "faults on core 2's buses never reach the memory bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
