// core_model: behavioural stand-in for a 16-bit Harvard core, used only by
// the testbenches. It is not the processor the frame was built for; it
// implements just enough of a tiny instruction set to exercise the frame.
//
// One instruction per clock while the fetched word is valid and `wait_i`
// is low. Word format: [15:12] opcode, [11:8] register d, [7:0] immediate.
//   0 NOP          1 LDL d,imm (low byte)    2 LDH d,imm (high byte)
//   3 LDW d,[imm[3:0]]                       4 STW d -> [imm[3:0]]
//   5 BTEST d,bit (sets flag T)              6 JMPT imm (jump if T)
//   7 JMP imm      8 ADDI d,simm8            9 EI   A DI
//   B BNE d,imm (jump if d != 0)             F000 mode switch (NOP here)
// Jump targets are absolute word addresses 0..255. A data access holds
// dreq until dgnt, then (reads) waits for drvalid. With interrupts
// enabled, a high `irq` sends the core to IRQ_VEC, or else a high `xirq`
// to XIRQ_VEC, and interrupts are disabled.
// `fault` flips address bit 0 of the data bus (fault injection).
module core_model #(
  parameter logic [15:0] IRQ_VEC  = 16'h0080,
  parameter logic [15:0] XIRQ_VEC = 16'h00A0
) (
  input  logic              clk,
  input  logic              rst,
  output logic [15:0]       iaddr,
  input  logic [15:0]       instr,
  input  logic              instr_valid,
  input  logic              wait_i,
  input  logic              irq,
  input  logic              xirq,
  output dcf_pkg::dreq_t    dreq,
  input  logic              dgnt,
  input  logic              drvalid,
  input  logic [15:0]       drdata,
  input  logic              fault
);

  typedef enum logic [1:0] {RUN, DREQ, DWAIT} st_e;

  logic [15:0] r [16];
  logic [15:0] pc;
  logic        ie, t;
  st_e         st;
  logic        we_q;
  logic [3:0]  rd_q;
  logic [15:0] a_q, wd_q;
  int unsigned irq_taken, xirq_taken;
  realtime     xirq_time;

  assign iaddr      = pc;
  assign dreq.req   = (st == DREQ);
  assign dreq.we    = we_q;
  assign dreq.addr  = a_q ^ {15'b0, fault};
  assign dreq.wdata = wd_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= '0; ie <= 1'b0; t <= 1'b0; st <= RUN;
      we_q <= 1'b0; rd_q <= '0; a_q <= '0; wd_q <= '0;
      for (int i = 0; i < 16; i++) r[i] <= '0;
      irq_taken <= 0; xirq_taken <= 0;
    end else begin
      unique case (st)
        RUN: if (!wait_i) begin
          if (irq && ie) begin
            pc <= IRQ_VEC; ie <= 1'b0; irq_taken <= irq_taken + 1;
          end else if (xirq && ie) begin
            pc <= XIRQ_VEC; ie <= 1'b0; xirq_taken <= xirq_taken + 1;
            xirq_time = $realtime;
          end else if (instr_valid) begin
            pc <= pc + 16'd1;
            unique case (instr[15:12])
              4'h1: r[instr[11:8]][7:0]  <= instr[7:0];
              4'h2: r[instr[11:8]][15:8] <= instr[7:0];
              4'h3, 4'h4: begin
                pc   <= pc;
                st   <= DREQ;
                we_q <= (instr[15:12] == 4'h4);
                rd_q <= instr[11:8];
                a_q  <= r[instr[3:0]];
                wd_q <= r[instr[11:8]];
              end
              4'h5: t <= r[instr[11:8]][instr[3:0]];
              4'h6: if (t) pc <= {8'h00, instr[7:0]};
              4'h7: pc <= {8'h00, instr[7:0]};
              4'h8: r[instr[11:8]] <= r[instr[11:8]] + {{8{instr[7]}}, instr[7:0]};
              4'h9: ie <= 1'b1;
              4'hA: ie <= 1'b0;
              4'hB: if (r[instr[11:8]] != 16'd0) pc <= {8'h00, instr[7:0]};
              default: ;
            endcase
          end
        end
        DREQ: if (dgnt) begin
          if (we_q) begin
            st <= RUN; pc <= pc + 16'd1;
          end else st <= DWAIT;
        end
        DWAIT: if (drvalid) begin
          r[rd_q] <= drdata; st <= RUN; pc <= pc + 16'd1;
        end
        default: st <= RUN;
      endcase
    end
  end

endmodule
