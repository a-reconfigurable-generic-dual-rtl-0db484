// tb_mode_fault_injection: stuck-at fault campaign across a mode round
// trip (safety -> performance -> safety), at the frame's default
// parameters.
//
// Same set-up as the safety-mode campaign: a golden system and a device
// under test, each a dual_core_frame with two behavioural cores, the same
// program, and one stuck-at-0 or stuck-at-1 per run on one bit of the
// buses between the device's cores and its frame (instruction addresses,
// instructions, data addresses, write and read data, request/write
// strobes, stall and grant lines). The program runs a short sequence in
// safety mode, switches to performance mode, where core 1 and core 2 run
// two different loops, returns to safety mode and then runs the
// safety-mode loop. The fault is switched on a few cycles after the
// device under test has entered performance mode. A watchdog (own clock,
// TIMEOUT cycles) watches the device's core mode signal and drives its
// reset pins.
//
// Each cycle (falling clock edge) the device's data memory bus is compared
// with the golden one; a difference is an effect. Detection is an invalid
// error_dr codeword, a memory parity error, or a watchdog reset. Each
// fault is counted as not activated, effect in performance mode, detected
// in performance mode, detected after the return to safety mode, or
// detected by the watchdog. A fault whose effect is never detected but
// which shows no effect after the return to safety mode (it only touches
// what the safety-mode program does not use) is counted apart. A fault
// with an undetected effect after the return, or whose first effect comes
// in safety mode and is not detected within two cycles, is a failure.
// After the return to safety mode the effect test compares the sequence
// of memory transactions instead of single cycles, since a fault in
// performance mode can shift the moment of the return. The
// run length is set from the fault-free run so that the watchdog cannot
// fire on a device that behaves like the golden one. Faults inside the
// frame's own gates are not injected.
module tb_mode_fault_injection;
  timeunit 1ns;
  timeprecision 1ps;
  import dcf_pkg::*;

  localparam time TCK        = 10ns;
  localparam int  TIMEOUT    = 200;
  localparam int  MARGIN     = 20;
  localparam int  N_SITES    = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(TCK/2) clk = ~clk;

  logic        prog_we = 1'b0;
  logic [15:0] prog_addr = '0, prog_data = '0;

  // ---- fault descriptor ------------------------------------------------
  int          f_site = -1;   // -1: no fault
  bit          f_on   = 1'b0; // fault switched on
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
    if (f_site != s || !f_on) return x;
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

  logic wclk = 1'b0, wd_t, wd_f, wd_exp;
  initial begin #3; forever #(TCK/2) wclk = ~wclk; end

  watchdog #(.TIMEOUT(TIMEOUT), .PULSE(4)) u_wd (
    .wclk(wclk), .rst_n(rst_n), .core_mode_dr(d_mode),
    .rst_t(wd_t), .rst_f(wd_f), .expired(wd_exp)
  );

  dual_core_frame dut (
    .clk(clk), .rst_n(rst_n), .irq_t(1'b0), .irq_f(1'b1), .crst_t(wd_t), .crst_f(wd_f),
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
    // safety mode prelude, switch to performance mode, split by core ID
    prog[0]   = I(1, 1, 8'h10);           // LDL r1,0x10
    prog[1]   = I(1, 2, 8'h5A);           // LDL r2,0x5A
    prog[2]   = I(4, 2, 8'h01);           // STW r2,[r1]
    prog[3]   = I(1, 1, 8'hF8);           // LDL r1,248
    prog[4]   = I(2, 1, 8'hFF);           // LDH r1,255
    prog[5]   = MS_INSTR;                 // mode switch -> performance
    prog[6]   = I(3, 2, 8'h01);           // LDW r2,[r1]   identification bit
    prog[7]   = I(5, 2, 8'h00);           // BTEST r2,0
    prog[8]   = I(6, 0, 8'h40);           // JMPT 0x40
    // core 1 application: six stores to 0x0100.., then back to safety mode
    prog[9]   = I(1, 4, 8'h00);           // LDL r4,0x00
    prog[10]  = I(2, 4, 8'h01);           // LDH r4,0x01
    prog[11]  = I(1, 5, 8'h06);           // LDL r5,6
    prog[12]  = I(8, 6, 8'h05);           // ADDI r6,5
    prog[13]  = I(4, 6, 8'h04);           // STW r6,[r4]
    prog[14]  = I(8, 4, 8'h01);           // ADDI r4,1
    prog[15]  = I(8, 5, 8'hFF);           // ADDI r5,-1
    prog[16]  = I(4'hB, 5, 8'd12);        // BNE r5,12
    prog[17]  = I(7, 0, 8'h80);           // JMP 0x80
    // core 2 application: store/load loop on 0x0200.. until core 1 asks
    // for safety mode (message interrupt to 0x80)
    prog[64]  = I(9, 0, 8'h00);           // EI
    prog[65]  = I(1, 4, 8'h00);           // LDL r4,0x00
    prog[66]  = I(2, 4, 8'h02);           // LDH r4,0x02
    prog[67]  = I(8, 7, 8'h03);           // ADDI r7,3
    prog[68]  = I(4, 7, 8'h04);           // STW r7,[r4]
    prog[69]  = I(3, 8, 8'h04);           // LDW r8,[r4]
    prog[70]  = I(8, 4, 8'h01);           // ADDI r4,1
    prog[71]  = I(7, 0, 8'd67);           // JMP 67
    // back to safety mode, then the safety-mode loop
    prog[128] = MS_INSTR;                 // mode switch -> safety
    prog[129] = I(1, 1, 8'h40);           // LDL r1,0x40
    prog[130] = I(2, 1, 8'h00);           // LDH r1,0
    prog[131] = I(1, 2, 8'h01);           // LDL r2,1
    prog[132] = I(1, 3, 8'h08);           // LDL r3,8
    prog[133] = I(8, 2, 8'h03);           // ADDI r2,3
    prog[134] = I(4, 2, 8'h01);           // STW r2,[r1]
    prog[135] = I(3, 4, 8'h01);           // LDW r4,[r1]
    prog[136] = I(8, 4, 8'h11);           // ADDI r4,0x11
    prog[137] = I(8, 1, 8'h01);           // ADDI r1,1
    prog[138] = I(4, 4, 8'h01);           // STW r4,[r1]
    prog[139] = I(8, 3, 8'hFF);           // ADDI r3,-1
    prog[140] = I(4'hB, 3, 8'd133);       // BNE r3,133
    prog[141] = I(1, 1, 8'h40);           // LDL r1,0x40
    prog[142] = I(1, 3, 8'h08);           // LDL r3,8
    prog[143] = I(7, 0, 8'd133);          // JMP 133
  end

  // ---- per-run observation ----------------------------------------------
  // data memory bus as the memory sees it, don't-care fields cleared
  function automatic logic [33:0] bus(input logic en, input logic we, input logic [15:0] a,
                                     input logic [15:0] wd);
    return {en, en && we, en ? a : 16'h0, (en && we) ? wd : 16'h0};
  endfunction

  bit running = 0;
  int cyc, t_eff, t_det, t_split, t_back, t_on, run_cycles, t_eff_safe;
  bit eff_split, det_wd, g_split;
  logic [33:0] gq [$], dq [$];

  always @(negedge clk) if (running) begin
    cyc++;
    if (t_split < 0 && d_mode == DR_MODE_SPLIT) t_split = cyc;
    if (t_split >= 0 && t_back < 0 && d_mode == DR_MODE_LOCK) t_back = cyc;
    if (t_split >= 0 && !f_on && cyc >= t_split + 3) begin f_on = 1'b1; t_on = cyc; end
    if (t_eff < 0 &&
        (bus(dut.u_dmem.en, dut.u_dmem.we, dut.u_dmem.addr, dut.u_dmem.wdata) !=
         bus(gold.u_dmem.en, gold.u_dmem.we, gold.u_dmem.addr, gold.u_dmem.wdata))) begin
      t_eff = cyc;
      eff_split = (d_mode == DR_MODE_SPLIT);
    end
    // after the return to safety mode: compare the order of memory
    // transactions, so that a device that returns a cycle early or late
    // but then behaves correctly shows no effect
    if (g_split && g_mode == DR_MODE_LOCK && gold.u_dmem.en)
      gq.push_back(bus(1'b1, gold.u_dmem.we, gold.u_dmem.addr, gold.u_dmem.wdata));
    if (t_back >= 0 && dut.u_dmem.en)
      dq.push_back(bus(1'b1, dut.u_dmem.we, dut.u_dmem.addr, dut.u_dmem.wdata));
    if (g_mode == DR_MODE_SPLIT) g_split = 1;
    while (gq.size() > 0 && dq.size() > 0) begin
      if (t_eff_safe < 0 && gq[0] != dq[0]) t_eff_safe = cyc;
      void'(gq.pop_front());
      void'(dq.pop_front());
    end
    if (t_det < 0 && (!dr_ok(d_err) || d_ipe || d_dpe || wd_t)) begin
      t_det = cyc;
      det_wd = wd_t && dr_ok(d_err) && !d_ipe && !d_dpe;
    end
    if (!dr_ok(g_err) || g_ipe || g_dpe) begin
      failures++;
      $display("FAIL: golden system signals an error at %0t", $time);
    end
  end

  // ---- watchdog of the testbench ---------------------------------------
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: testbench time limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_faults = 0, n_inactive = 0, n_eff_split = 0, n_det_split = 0, n_det_back = 0;
  int n_det_wd = 0, n_det_noeff = 0, n_bad = 0, n_perf_only = 0;

  task automatic run_one(input int cycles);
    rst_n = 1'b0;
    f_on  = 1'b0;
    repeat (3) @(posedge clk);
    // same start contents in both data memories: zero words, even parity
    for (int i = 0; i < 1024; i++) begin
      gold.u_dmem.mem[i] = '0;
      dut.u_dmem.mem[i]  = '0;
    end
    @(negedge clk);
    cyc = 0; t_eff = -1; t_det = -1; t_split = -1; t_back = -1; t_on = -1; t_eff_safe = -1;
    eff_split = 0; det_wd = 0; g_split = 0;
    gq.delete(); dq.delete();
    running = 1;
    rst_n = 1'b1;
    repeat (cycles) @(posedge clk);
    @(negedge clk);
    running = 0;
  endtask

  initial begin
    #1;
    for (int i = 0; i < 1024; i++) begin
      gold.u_imem.mem[i] = '0;
      dut.u_imem.mem[i]  = '0;
    end
    for (int a = 0; a < 148; a++) begin
      @(negedge clk);
      prog_we   = 1'b1;
      prog_addr = 16'(a);
      prog_data = prog.exists(a) ? prog[a] : 16'h0000;
    end
    @(negedge clk) prog_we = 1'b0;

    // fault-free reference run: find the return to safety mode
    f_site = -1;
    run_one(600);
    check(t_split > 0 && t_back > t_split, "fault-free run: performance mode and back");
    check(t_eff < 0 || t_eff > t_back + TIMEOUT - MARGIN, "fault-free run: no effect before the watchdog");
    check(t_back - t_split > MARGIN + 8, "performance phase longer than the margin");
    run_cycles = t_back + TIMEOUT - MARGIN;
    check(gold.u_dmem.mem[16'h0105][15:0] == 16'd30, "core 1 application stored its data");
    check(gold.u_dmem.mem[16'h0200][15:0] == 16'd3, "core 2 application stored its data");
    $display("performance mode from cycle %0d to %0d, run length %0d", t_split, t_back, run_cycles);
    run_one(run_cycles);
    check(t_eff < 0 && t_det < 0 && u_wd.count != 0, "fault-free run of full length: quiet");

    for (int s = 0; s < N_SITES; s++)
      for (int b = 0; b < site_width(s); b++)
        for (int v = 0; v < 2; v++) begin
          bit ok;
          f_site = s; f_bit = b; f_val = v[0];
          run_one(run_cycles);
          n_faults++;
          ok = 1;
          if (t_eff < 0 && t_det < 0) n_inactive++;
          else if (t_eff < 0) n_det_noeff++;
          else begin
            if (eff_split) n_eff_split++;
            if (t_det < 0 && t_eff_safe < 0 && t_back >= 0) n_perf_only++;
            else if (t_det < 0) ok = 0;
            else if (!eff_split && t_det > t_eff + 2) ok = 0;
            else if (det_wd) n_det_wd++;
            else if (t_back < 0 || t_det < t_back) n_det_split++;
            else n_det_back++;
          end
          if (!ok) begin
            n_bad++;
            $display("fault %s bit %0d stuck-at-%0d: effect at %0d (%s), detection at %0d, back at %0d",
                     site_name(s), b, v, t_eff, eff_split ? "performance" : "safety", t_det, t_back);
          end
          check(ok, $sformatf("%s bit %0d stuck-at-%0d detected", site_name(s), b, v));
        end

    $display("faults=%0d not_activated=%0d detected_without_effect=%0d effect_in_performance=%0d detected_in_performance=%0d detected_after_return=%0d detected_by_watchdog=%0d undetected_effect_in_performance_only=%0d undetected=%0d",
             n_faults, n_inactive, n_det_noeff, n_eff_split, n_det_split, n_det_back, n_det_wd, n_perf_only, n_bad);
    check(n_faults - n_inactive > n_faults / 2, "most faults activated by the workload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
