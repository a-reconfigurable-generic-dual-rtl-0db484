// tb_dcu: the testbench plays both cores and the data memory (reference
// array, one-cycle read latency, parity stored).
// Lock mode: both cores run the same access list, core 2 1.5 cycles
// behind; only core 1's accesses may reach the memory, core 2 must get
// each grant and read word 1.5 cycles after core 1, the identification
// address reads 0, and the lock-mode error signal stays valid.
// Split mode: both cores run random accesses at once; every read must
// return the reference value, conflicts must occur, the identification bit
// must read 0 for core 1 and 1 for core 2, and while core 1 holds the
// semaphore core 2's accesses must be held off. Bad parity from the
// memory must show on the split-mode error signal.
module tb_dcu;
  import dcf_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, lock = 1, alt = 0, clk2;
  dreq_t r1 = '0, r2 = '0;
  logic g1, g2, v1, v2, den, dwe, dapar, dwpar, cf, sb, idr;
  logic [15:0] d1, d2, daddr, dwdata, drdata = 0;
  logic drpar = 0;
  logic [1:0] es, ep;
  logic [15:0] mem [1024];
  bit bad_par = 0;
  int checks = 0, failures = 0, n_es = 0, n_cf = 0, n_sb = 0, n_ep = 0;

  always #5 clk = ~clk;
  assign clk2 = lock ? ~clk : clk;
  always @(posedge clk) alt <= ~alt;

  dcu #(.W(16)) dut (.clk(clk), .rst_n(rst_n), .lock(lock), .alt(alt),
    .c1_req(r1), .c1_gnt(g1), .c1_rvalid(v1), .c1_rdata(d1),
    .c2_req(r2), .c2_gnt(g2), .c2_rvalid(v2), .c2_rdata(d2),
    .dmem_en(den), .dmem_we(dwe), .dmem_addr(daddr), .dmem_addr_par(dapar),
    .dmem_wdata(dwdata), .dmem_wpar(dwpar), .dmem_rdata(drdata), .dmem_rpar(drpar),
    .err_safe_dr(es), .err_perf_dr(ep), .conflict(cf), .sem_block(sb), .id_read(idr));

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  always @(posedge clk) begin
    if (den) begin
      if (dwe) mem[daddr[9:0]] <= dwdata;
      else begin drdata <= mem[daddr[9:0]]; drpar <= ^mem[daddr[9:0]] ^ bad_par; end
      chk(dapar == ^daddr && (!dwe || dwpar == ^dwdata), "outgoing parities");
    end
    if (!(es[1] ^ es[0])) n_es++;
    if (!(ep[1] ^ ep[0])) n_ep++;
    if (cf) n_cf++;
    if (sb) n_sb++;
  end

  // one access of core 1 or 2 on its own clock
  task automatic acc1(input bit we, input logic [15:0] a, input logic [15:0] wd,
                      output logic [15:0] rd, output realtime tg, output realtime tv);
    @(posedge clk); #1 r1 = '{req: 1'b1, we: we, addr: a, wdata: wd};
    do @(posedge clk); while (!g1);
    tg = $realtime; #1 r1.req = 1'b0;
    if (!we) begin do @(posedge clk); while (!v1); rd = d1; tv = $realtime; end
  endtask
  task automatic acc2(input bit we, input logic [15:0] a, input logic [15:0] wd,
                      output logic [15:0] rd, output realtime tg, output realtime tv);
    @(posedge clk2); #1 r2 = '{req: 1'b1, we: we, addr: a, wdata: wd};
    do @(posedge clk2); while (!g2);
    tg = $realtime; #1 r2.req = 1'b0;
    if (!we) begin do @(posedge clk2); while (!v2); rd = d2; tv = $realtime; end
  endtask

  typedef struct { bit we; logic [15:0] a, wd; } op_t;

  initial begin
    op_t ops [40];
    logic [15:0] ref_mem [1024];
    #22 rst_n = 1;
    for (int i = 0; i < 1024; i++) begin mem[i] = 16'($urandom); ref_mem[i] = mem[i]; end
    // ---- lock mode -----------------------------------------------------
    foreach (ops[i]) begin
      ops[i].we = 1'($urandom); ops[i].a = (i == 7) ? ID_ADDR : 16'($urandom_range(0, 63));
      ops[i].wd = 16'($urandom);
      if (ops[i].a == ID_ADDR) ops[i].we = 0;
    end
    n_es = 0;
    @(posedge clk);
    fork
      begin
        foreach (ops[i]) begin
          logic [15:0] rd; realtime tg, tv, tg2, tv2; logic [15:0] rd2;
          fork
            acc1(ops[i].we, ops[i].a, ops[i].wd, rd, tg, tv);
            begin #16; acc2(ops[i].we, ops[i].a, ops[i].wd, rd2, tg2, tv2); end
          join
          chk(tg2 - tg == 15.0, "core 2 grant 1.5 cycles after core 1");
          if (!ops[i].we) begin
            logic [15:0] e;
            e = (ops[i].a == ID_ADDR) ? 16'd0 : ref_mem[ops[i].a[9:0]];
            chk(rd == e, "core 1 read");
            chk(rd2 == e && tv2 - tv == 15.0, "core 2 read word 1.5 cycles later");
          end else ref_mem[ops[i].a[9:0]] = ops[i].wd;
        end
      end
    join
    chk(n_es == 0, "no lock-mode error for identical access streams");
    // ---- split mode ------------------------------------------------------
    repeat (3) @(posedge clk);
    @(negedge clk) lock = 0;
    repeat (3) @(posedge clk);
    n_cf = 0;
    fork
      for (int i = 0; i < 60; i++) begin
        logic [15:0] rd, a, wd; realtime tg, tv; bit we;
        a = (i % 10 == 3) ? ID_ADDR : 16'($urandom_range(100, 199));
        we = (a != ID_ADDR) && 1'($urandom); wd = 16'($urandom);
        acc1(we, a, wd, rd, tg, tv);
        if (we) ref_mem[a[9:0]] = wd;
        else chk(rd == ((a == ID_ADDR) ? 16'd0 : ref_mem[a[9:0]]), "core 1 split read");
      end
      for (int i = 0; i < 60; i++) begin
        logic [15:0] rd, a, wd; realtime tg, tv; bit we;
        a = (i % 10 == 5) ? ID_ADDR : 16'($urandom_range(200, 299));
        we = (a != ID_ADDR) && 1'($urandom); wd = 16'($urandom);
        acc2(we, a, wd, rd, tg, tv);
        if (we) ref_mem[a[9:0]] = wd;
        else chk(rd == ((a == ID_ADDR) ? 16'd1 : ref_mem[a[9:0]]), "core 2 split read");
      end
    join
    chk(n_cf > 0, "conflicts occurred");
    // ---- semaphore ---------------------------------------------------------
    begin
      logic [15:0] rd; realtime tg, tv, t_unlock, t2g;
      acc1(1, SEM_ADDR, 16'd1, rd, tg, tv);            // core 1 takes it
      acc1(0, SEM_ADDR, 16'd0, rd, tg, tv);
      chk(rd == 16'd1, "core 1 sees itself as holder");
      n_sb = 0;
      fork
        begin acc2(1, 16'd300, 16'hBEEF, rd, t2g, tv); end
        begin
          repeat (10) @(posedge clk);
          acc1(1, SEM_ADDR, 16'd0, rd, t_unlock, tv);  // release
        end
      join
      chk(n_sb >= 9, "core 2 held off while locked");
      chk(t2g > t_unlock, "core 2 granted only after release");
      chk(mem[300] == 16'hBEEF, "held write performed after release");
      acc2(0, ID_ADDR, 0, rd, tg, tv);
      chk(rd == 16'd1, "identification read allowed");
    end
    // ---- bad parity --------------------------------------------------------
    begin
      logic [15:0] rd; realtime tg, tv;
      n_ep = 0; bad_par = 1;
      acc1(0, 16'd5, 0, rd, tg, tv);
      bad_par = 0;
      repeat (2) @(posedge clk);
      chk(n_ep > 0, "bad read parity flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
