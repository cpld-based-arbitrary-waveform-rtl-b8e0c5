// phase_adder: the phase accumulator's adder.
//
// Adds the tuning word M to the current phase. The sum is the next Phase Register value,
// taken modulo 2^W, so the phase wraps once per output cycle. The carry-in is tied to 0. The
// carry-out co marks a phase wrap: one complete pass through the waveform RAM. In the
// original a 16-bit and an 8-bit adder are chained through the carry. Here it is one W-bit
// adder. Purely combinational.
module phase_adder
  import awg_pkg::*;
#(
  parameter int unsigned W = PHASE_W  // 24
) (
  input  logic [W-1:0] a,   // tuning word M (from PIR)
  input  logic [W-1:0] b,   // current phase (from PR)
  output logic [W-1:0] s,   // next phase
  output logic         co   // carry out: phase wrapped
);

  always_comb {co, s} = {1'b0, a} + {1'b0, b};

endmodule
