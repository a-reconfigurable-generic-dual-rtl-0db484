// mode_switch_detect: snoops the instruction bus between a core and its
// cache and signals the mode switch unit while the mode switching
// instruction is being delivered to the core.
//
// `core_signal` is combinational: it is high whenever a valid instruction
// equal to MS_INSTR sits on the bus, so the mode switch unit can halt the
// core before its next clock edge. The instruction stays on the bus while
// the core is halted, which keeps the signal up until the switch is over.
// Detection at fetch time follows the document; the instruction encoding
// is this design's choice.
module mode_switch_detect #(
  parameter logic [15:0] MS = dcf_pkg::MS_INSTR
) (
  input  logic [15:0] instr,
  input  logic        instr_valid,
  output logic        core_signal
);

  assign core_signal = instr_valid && (instr == MS);

endmodule
