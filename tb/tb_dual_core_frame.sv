// tb_dual_core_frame: end-to-end test of the dual-core frame with two
// behavioural cores, at the frame's default parameters.
//
// The program starts in lock mode (master/checker), writes and reads the
// protected data area, reads the identification address and switches to
// split mode. There the identification bit makes core 2 branch away; core 1
// takes the data memory semaphore, tries a write into the protected area
// (refused), writes elsewhere, waits and releases the semaphore, while
// core 2's write is held off by it. Core 1 then executes the mode switch
// instruction; the frame interrupts core 2, which jumps to the same
// instruction, and both return to lock mode, where the split-loaded cache
// line must be refetched. In lock mode an external interrupt arrives on
// the dual-rail interrupt pins: both cores must take it, core 2 exactly
// 1.5 cycles after core 1, and a disagreement of the two rails must show on
// the input error output. Finally a fault on core 2's data address bus
// must be reported on the error output within two cycles.
//
// Checked: memory contents, registers of both cores, 1.5-cycle lag of
// core 2 in lock mode, the mode signal, a clean error signal during the
// whole run, fault detection latency, and that every mechanism occurred.
module tb_dual_core_frame;
  timeunit 1ns;
  timeprecision 1ps;
  import dcf_pkg::*;

  localparam time TCK = 10ns;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(TCK/2) clk = ~clk;

  logic        c1_clk, c1_rst, c1_iv, c1_wait, c1_msg, c1_irq, c1_dgnt, c1_drv;
  logic        c2_clk, c2_rst, c2_iv, c2_wait, c2_msg, c2_irq, c2_dgnt, c2_drv;
  logic [15:0] c1_iaddr, c1_instr, c1_drd, c2_iaddr, c2_instr, c2_drd;
  dreq_t       c1_dreq, c2_dreq;
  logic        prog_we = 1'b0;
  logic [15:0] prog_addr = '0, prog_data = '0;
  logic [1:0]  core_mode_dr, error_dr, input_err_dr;
  logic        imem_pe, dmem_pe, wp_hit, icu_cf, dcu_cf, sem_block, id_read;
  logic        fault = 1'b0;
  logic        irq_t = 1'b0, irq_f = 1'b1;

  dual_core_frame dut (
    .clk(clk), .rst_n(rst_n), .irq_t(irq_t), .irq_f(irq_f), .crst_t(1'b0), .crst_f(1'b1),
    .c1_clk(c1_clk), .c1_rst(c1_rst), .c1_iaddr(c1_iaddr), .c1_instr(c1_instr),
    .c1_instr_valid(c1_iv), .c1_wait(c1_wait), .c1_message(c1_msg), .c1_irq(c1_irq),
    .c1_dreq(c1_dreq), .c1_dgnt(c1_dgnt), .c1_drvalid(c1_drv), .c1_drdata(c1_drd),
    .c2_clk(c2_clk), .c2_rst(c2_rst), .c2_iaddr(c2_iaddr), .c2_instr(c2_instr),
    .c2_instr_valid(c2_iv), .c2_wait(c2_wait), .c2_message(c2_msg), .c2_irq(c2_irq),
    .c2_dreq(c2_dreq), .c2_dgnt(c2_dgnt), .c2_drvalid(c2_drv), .c2_drdata(c2_drd),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .core_mode_dr(core_mode_dr), .error_dr(error_dr), .input_err_dr(input_err_dr),
    .imem_par_err(imem_pe), .dmem_par_err(dmem_pe), .dmem_wp_hit(wp_hit),
    .icu_conflict(icu_cf), .dcu_conflict(dcu_cf), .sem_block(sem_block), .id_read(id_read)
  );

  core_model #(.IRQ_VEC(16'h0080)) u_core1 (
    .clk(c1_clk), .rst(c1_rst), .iaddr(c1_iaddr), .instr(c1_instr), .instr_valid(c1_iv),
    .wait_i(c1_wait), .irq(c1_msg), .xirq(c1_irq), .dreq(c1_dreq), .dgnt(c1_dgnt), .drvalid(c1_drv),
    .drdata(c1_drd), .fault(1'b0)
  );

  core_model #(.IRQ_VEC(16'h0080)) u_core2 (
    .clk(c2_clk), .rst(c2_rst), .iaddr(c2_iaddr), .instr(c2_instr), .instr_valid(c2_iv),
    .wait_i(c2_wait), .irq(c2_msg), .xirq(c2_irq), .dreq(c2_dreq), .dgnt(c2_dgnt), .drvalid(c2_drv),
    .drdata(c2_drd), .fault(fault)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- program -------------------------------------------------------
  logic [15:0] prog [int];

  function automatic logic [15:0] I(input logic [3:0] op, input logic [3:0] d, input logic [7:0] imm);
    return {op, d, imm};
  endfunction

  initial begin
    // lock mode
    prog[0]  = I(1, 1, 8'h10);            // LDL r1,0x10
    prog[1]  = I(1, 2, 8'h5A);            // LDL r2,0x5A
    prog[2]  = I(4, 2, 8'h01);            // STW r2,[r1]   protected area, allowed in lock mode
    prog[3]  = I(3, 3, 8'h01);            // LDW r3,[r1]
    prog[4]  = I(1, 1, 8'hF8);            // LDL r1,248
    prog[5]  = I(2, 1, 8'hFF);            // LDH r1,255
    prog[6]  = MS_INSTR;                  // mode switch -> split
    prog[7]  = I(3, 2, 8'h01);            // LDW r2,[r1]   identification bit
    prog[8]  = I(5, 2, 8'h00);            // BTEST r2,0
    prog[9]  = I(6, 0, 8'h40);            // JMPT 0x40     core 2 leaves
    // core 1 in split mode
    prog[10] = I(1, 6, 8'hF9);            // LDL r6,0xF9
    prog[11] = I(2, 6, 8'hFF);            // LDH r6,0xFF
    prog[12] = I(1, 7, 8'h01);            // LDL r7,1
    prog[13] = I(4, 7, 8'h06);            // STW r7,[r6]   take semaphore
    prog[14] = I(1, 5, 8'h77);            // LDL r5,0x77
    prog[15] = I(1, 4, 8'h20);            // LDL r4,0x20
    prog[16] = I(4, 5, 8'h04);            // STW r5,[r4]   protected: refused
    prog[17] = I(1, 4, 8'h00);            // LDL r4,0x00
    prog[18] = I(2, 4, 8'h01);            // LDH r4,0x01
    prog[19] = I(4, 5, 8'h04);            // STW r5,[r4]   0x0100 <- 0x77
    prog[20] = I(1, 11, 8'd40);           // LDL r11,40
    prog[21] = I(8, 11, 8'hFF);           // ADDI r11,-1
    prog[22] = I(4'hB, 11, 8'd21);        // BNE r11,21
    prog[23] = I(1, 7, 8'h00);            // LDL r7,0
    prog[24] = I(4, 7, 8'h06);            // STW r7,[r6]   release semaphore
    prog[25] = I(3, 8, 8'h04);            // LDW r8,[r4]
    prog[26] = I(7, 0, 8'h80);            // JMP 0x80
    // core 2 in split mode
    prog[64] = I(9, 0, 8'h00);            // EI
    prog[65] = I(1, 4, 8'h01);            // LDL r4,0x01
    prog[66] = I(2, 4, 8'h01);            // LDH r4,0x01
    prog[67] = I(1, 5, 8'h99);            // LDL r5,0x99
    prog[68] = I(4, 5, 8'h04);            // STW r5,[r4]   0x0101 <- 0x99 (held off)
    prog[69] = I(3, 9, 8'h04);            // LDW r9,[r4]
    prog[70] = I(8, 10, 8'h01);           // ADDI r10,1
    prog[71] = I(7, 0, 8'd70);            // JMP 70        wait for the interrupt
    // merge point and lock mode again
    prog[128] = MS_INSTR;                 // mode switch -> lock
    prog[129] = I(1, 1, 8'h10);           // LDL r1,0x10
    prog[130] = I(2, 1, 8'h00);           // LDH r1,0
    prog[131] = I(3, 12, 8'h01);          // LDW r12,[r1]
    prog[132] = I(1, 13, 8'h33);          // LDL r13,0x33
    prog[133] = I(4, 13, 8'h01);          // STW r13,[r1]
    prog[134] = I(9, 0, 8'h00);           // EI
    prog[135] = I(3, 14, 8'h01);          // LDW r14,[r1]  end loop
    prog[136] = I(7, 0, 8'd135);          // JMP 135
    // external interrupt handler
    prog[160] = I(8, 15, 8'h01);          // ADDI r15,1
    prog[161] = I(4, 15, 8'h01);          // STW r15,[r1]
    prog[162] = I(7, 0, 8'd135);          // JMP 135
  end

  // ---- event counters ----------------------------------------------------
  int n_to_split = 0, n_to_lock = 0, n_icf = 0, n_dcf = 0, n_sem = 0, n_id = 0;
  int n_wp = 0, n_relock_fill = 0, n_err_clean = 0, n_msg = 0;
  logic [1:0] mode_q = DR_MODE_LOCK;
  logic       busy_q = 1'b0;
  bit         fault_phase = 0, rail_phase = 0;

  always @(posedge clk) if (rst_n) begin
    mode_q <= core_mode_dr;
    if (mode_q == DR_MODE_LOCK  && core_mode_dr == DR_MODE_SPLIT) n_to_split++;
    if (mode_q == DR_MODE_SPLIT && core_mode_dr == DR_MODE_LOCK)  n_to_lock++;
    if (icu_cf) n_icf++;
    if (dcu_cf) n_dcf++;
    if (sem_block) n_sem++;
    if (id_read) n_id++;
    if (wp_hit) n_wp++;
    if (c2_msg && !c2_wait) n_msg++;
    busy_q <= dut.u_cache1.busy;
    if (core_mode_dr == DR_MODE_LOCK && !busy_q && dut.u_cache1.busy &&
        dut.u_cache1.blk_q == 14'h0020 && n_to_lock > 0) n_relock_fill++;
    if (!fault_phase) begin
      if (!dr_ok(error_dr)) begin
        failures++;
        $display("FAIL: error signal raised at %0t mode=%b pc1=%0d pc2=%0d icu=%b dcu=%b", $time, core_mode_dr,
                 u_core1.pc, u_core2.pc, dut.es_icu, dut.es_dcu);
      end else n_err_clean++;
      if (imem_pe || dmem_pe || (!dr_ok(input_err_dr) && !rail_phase)) begin
        failures++;
        $display("FAIL: parity / input error at %0t", $time);
      end
    end
  end

  // lag of core 2 behind core 1 in lock mode (data requests)
  realtime t1 [$], t2 [$];
  always @(posedge c1_dreq.req) if (core_mode_dr == DR_MODE_LOCK) t1.push_back($realtime);
  always @(posedge c2_dreq.req) if (core_mode_dr == DR_MODE_LOCK) t2.push_back($realtime);

  // alternation of the error output
  int n_alt = 0;
  logic [1:0] err_q;
  always @(posedge clk) begin
    err_q <= error_dr;
    if (rst_n && !fault_phase && error_dr != err_q) n_alt++;
  end

  // ---- watchdog --------------------------------------------------------
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    realtime t_eff;
    // load the program while the frame is in reset
    #1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      prog_we   = 1'b1;
      prog_addr = 16'(a);
      prog_data = prog.exists(a) ? prog[a] : 16'h0000;
    end
    @(negedge clk) prog_we = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // run until core 1 sits on the final loop in lock mode
    wait (n_to_lock == 1 && u_core1.pc >= 16'd135 && u_core2.pc >= 16'd135);
    repeat (20) @(posedge clk);

    check(n_to_split == 1, "one switch to split mode");
    check(n_to_lock == 1, "one switch back to lock mode");
    check(core_mode_dr == DR_MODE_LOCK, "ends in lock mode");
    check(dut.u_dmem.mem[16'h10][15:0] == 16'h0033, "lock-mode write to protected word");
    check(dut.u_dmem.mem[16'h20][15:0] != 16'h0077, "split-mode write to protected word refused");
    check(dut.u_dmem.mem[16'h100][15:0] == 16'h0077, "core 1 split-mode write");
    check(dut.u_dmem.mem[16'h101][15:0] == 16'h0099, "core 2 split-mode write");
    check(dut.u_dmem.mem[16'h100][16] == ^16'h0077, "stored parity");
    check(u_core1.r[3] == 16'h005A && u_core2.r[3] == 16'h005A, "lock-mode read by both cores");
    check(u_core1.r[2] == 16'd0, "core 1 identification bit 0");
    check(u_core2.r[2] == 16'd1, "core 2 identification bit 1");
    check(u_core1.r[8] == 16'h0077, "core 1 read back");
    check(u_core2.r[9] == 16'h0099, "core 2 read back");
    check(u_core1.r[12] == 16'h005A && u_core2.r[12] == 16'h005A, "read after return to lock");
    check(u_core2.irq_taken == 1, "core 2 took the mode switch interrupt once");
    check(u_core1.irq_taken == 0, "core 1 took no interrupt");
    // core 2 lags core 1 by 1.5 cycles in lock mode
    check(t1.size() >= 4 && t1.size() - t2.size() inside {0, 1}, "same number of lock-mode data requests");
    foreach (t2[i]) if (i < t1.size()) check(t2[i] - t1[i] == 1.5 * TCK, $sformatf("lag %0t", t2[i] - t1[i]));
    check(n_alt > 100, "error signal alternates");
    // mechanisms
    check(n_icf > 0, "instruction memory conflict");
    check(n_dcf > 0, "data memory conflict");
    check(n_sem > 0, "semaphore hold-off");
    check(n_id >= 2, "identification reads");
    check(n_wp == 1, "write protection hit");
    check(n_relock_fill > 0, "refill of a split-loaded line in lock mode");
    check(n_msg > 0, "mode switch message to core 2");
    check(n_err_clean > 100, "error signal clean while fault-free");
    check(u_core1.xirq_taken == 0 && u_core2.xirq_taken == 0, "no external interrupt yet");
    $display("events: to_split=%0d to_lock=%0d icu_conflict=%0d dcu_conflict=%0d sem=%0d id=%0d wp=%0d relock_fill=%0d msg=%0d",
             n_to_split, n_to_lock, n_icf, n_dcf, n_sem, n_id, n_wp, n_relock_fill, n_msg);

    // external interrupt in lock mode through the dual-rail input stage:
    // both cores take it, core 2 1.5 cycles after core 1, and run the
    // handler without a mismatch
    @(negedge clk) begin irq_t = 1'b1; irq_f = 1'b0; end
    repeat (6) @(posedge clk);
    @(negedge clk) begin irq_t = 1'b0; irq_f = 1'b1; end
    repeat (20) @(posedge clk);
    check(u_core1.xirq_taken == 1 && u_core2.xirq_taken == 1, "both cores took the interrupt");
    check(u_core2.xirq_time - u_core1.xirq_time == 1.5 * TCK,
          $sformatf("interrupt lag %0t", u_core2.xirq_time - u_core1.xirq_time));
    check(u_core1.r[15] == 16'd1 && u_core2.r[15] == 16'd1, "interrupt handler ran on both cores");
    check(dut.u_dmem.mem[16'h10][15:0] == 16'h0001, "interrupt handler store");
    check(dr_ok(error_dr), "no mismatch after the interrupt");
    // rail disagreement on the interrupt input is reported
    rail_phase = 1;
    @(negedge clk) irq_f = 1'b0;
    repeat (4) @(posedge clk);
    #1 check(!dr_ok(input_err_dr), "interrupt rail disagreement reported");
    @(negedge clk) irq_f = 1'b1;
    repeat (4) @(posedge clk);
    #1 check(dr_ok(input_err_dr), "input error clears when the rails agree");
    rail_phase = 0;

    // fault in core 2: its data address differs from core 1's
    @(posedge clk);
    fault_phase = 1;
    @(negedge clk) fault = 1'b1;
    // the fault becomes effective with core 2's next data request
    wait (c2_dreq.req);
    t_eff = $realtime;
    lat = 0;
    while (dr_ok(error_dr) && lat < 20) begin
      @(posedge clk); #1;
      lat = int'(($realtime - t_eff) / TCK);
    end
    check(!dr_ok(error_dr), "injected fault detected");
    check(lat <= 2, $sformatf("detection latency %0d cycles", lat));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
