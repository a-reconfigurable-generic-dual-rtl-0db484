// tb_dual_core_frame_reset: core reset through the dual-rail reset input
// while the frame runs in split mode, at the frame's default parameters.
//
// Two behavioural cores run a short program: a store and a load in lock
// mode, the switch to split mode, the identification read and the branch
// that separates the cores, then a counting loop on each core. While both
// loop in split mode the reset pins are pulsed for six cycles. Checked:
// the frame is back in lock mode during the reset; core 2's reset ends
// exactly 1.5 cycles after core 1's; both cores restart from address 0 as
// a master/checker pair (data requests 1.5 cycles apart, clean error
// signal) and reach split mode a second time; the input error output
// stays clean because the two reset rails always agree.
module tb_dual_core_frame_reset;
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
  logic        crst_t = 1'b0, crst_f = 1'b1;

  dual_core_frame dut (
    .clk(clk), .rst_n(rst_n), .irq_t(1'b0), .irq_f(1'b1), .crst_t(crst_t), .crst_f(crst_f),
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

  core_model u_core1 (
    .clk(c1_clk), .rst(c1_rst), .iaddr(c1_iaddr), .instr(c1_instr), .instr_valid(c1_iv),
    .wait_i(c1_wait), .irq(c1_msg), .xirq(c1_irq), .dreq(c1_dreq), .dgnt(c1_dgnt),
    .drvalid(c1_drv), .drdata(c1_drd), .fault(1'b0)
  );

  core_model u_core2 (
    .clk(c2_clk), .rst(c2_rst), .iaddr(c2_iaddr), .instr(c2_instr), .instr_valid(c2_iv),
    .wait_i(c2_wait), .irq(c2_msg), .xirq(c2_irq), .dreq(c2_dreq), .dgnt(c2_dgnt),
    .drvalid(c2_drv), .drdata(c2_drd), .fault(1'b0)
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
    prog[0]  = I(1, 5, 8'h30);            // LDL r5,0x30
    prog[1]  = I(4, 5, 8'h05);            // STW r5,[r5]
    prog[2]  = I(3, 6, 8'h05);            // LDW r6,[r5]
    prog[3]  = I(1, 1, 8'hF8);            // LDL r1,248
    prog[4]  = I(2, 1, 8'hFF);            // LDH r1,255
    prog[5]  = MS_INSTR;                  // mode switch -> split
    prog[6]  = I(3, 2, 8'h01);            // LDW r2,[r1]   identification bit
    prog[7]  = I(5, 2, 8'h00);            // BTEST r2,0
    prog[8]  = I(6, 0, 8'h40);            // JMPT 0x40
    prog[9]  = I(8, 3, 8'h01);            // ADDI r3,1     core 1 loop
    prog[10] = I(7, 0, 8'd9);             // JMP 9
    prog[64] = I(8, 3, 8'h02);            // ADDI r3,2     core 2 loop
    prog[65] = I(7, 0, 8'd64);            // JMP 64
  end

  // ---- monitors ----------------------------------------------------------
  int n_to_split = 0, n_to_lock = 0;
  logic [1:0] mode_q = DR_MODE_LOCK;
  always @(posedge clk) if (rst_n) begin
    mode_q <= core_mode_dr;
    if (mode_q == DR_MODE_LOCK  && core_mode_dr == DR_MODE_SPLIT) n_to_split++;
    if (mode_q == DR_MODE_SPLIT && core_mode_dr == DR_MODE_LOCK)  n_to_lock++;
    if (!dr_ok(error_dr)) begin
      failures++;
      $display("FAIL: error signal raised at %0t mode=%b", $time, core_mode_dr);
    end
    if (imem_pe || dmem_pe || !dr_ok(input_err_dr)) begin
      failures++;
      $display("FAIL: parity / input error at %0t", $time);
    end
  end

  realtime t1 [$], t2 [$];
  bit      second_run = 0;
  always @(posedge c1_dreq.req) if (second_run && core_mode_dr == DR_MODE_LOCK) t1.push_back($realtime);
  always @(posedge c2_dreq.req) if (second_run && core_mode_dr == DR_MODE_LOCK) t2.push_back($realtime);

  realtime t_rel1, t_rel2;
  always @(negedge c1_rst) if (second_run) t_rel1 = $realtime;
  always @(negedge c2_rst) if (second_run) t_rel2 = $realtime;

  // ---- watchdog --------------------------------------------------------
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int a = 0; a < 80; a++) begin
      @(negedge clk);
      prog_we   = 1'b1;
      prog_addr = 16'(a);
      prog_data = prog.exists(a) ? prog[a] : 16'h0000;
    end
    @(negedge clk) prog_we = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // first run: into split mode, both cores in their loops
    wait (n_to_split == 1 && u_core1.r[3] > 3 && u_core2.r[3] > 6);
    check(core_mode_dr == DR_MODE_SPLIT, "split mode before the core reset");
    check(u_core1.r[2] == 16'd0 && u_core2.r[2] == 16'd1, "cores separated by the identification bit");

    // core reset pulse on both rails
    second_run = 1;
    @(negedge clk) begin crst_t = 1'b1; crst_f = 1'b0; end
    repeat (4) @(posedge clk);
    #1 check(core_mode_dr == DR_MODE_LOCK, "lock mode during the core reset");
    check(c1_rst && c2_rst, "both cores held in reset");
    check(!c1_wait && !c2_wait, "no core left waiting");
    repeat (2) @(posedge clk);
    @(negedge clk) begin crst_t = 1'b0; crst_f = 1'b1; end

    // second run
    wait (n_to_split == 2 && u_core1.r[3] > 3 && u_core2.r[3] > 6);
    repeat (5) @(posedge clk);
    check(n_to_lock == 1, "one return to lock mode, by the core reset");
    check(t_rel2 - t_rel1 == 1.5 * TCK, $sformatf("core 2 reset released %0t after core 1", t_rel2 - t_rel1));
    check(t1.size() == 2 && t2.size() == 2, "lock-mode data requests after the reset");
    foreach (t2[i]) if (i < t1.size()) check(t2[i] - t1[i] == 1.5 * TCK, $sformatf("lag %0t", t2[i] - t1[i]));
    check(u_core1.r[6] == 16'h0030 && u_core2.r[6] == 16'h0030, "lock-mode load after the reset");
    check(u_core1.r[2] == 16'd0 && u_core2.r[2] == 16'd1, "cores separated again");
    check(core_mode_dr == DR_MODE_SPLIT, "split mode again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
