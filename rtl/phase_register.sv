// phase_register: the Phase Register (PR) of the phase accumulator.
//
// A W-bit register that loads the adder's sum on each clock edge where ck_en is high, and
// clears to 0 while the system reset rst is high. Its top AW bits are the waveform RAM
// address: PR[23:9] drives ADD0..ADD14. Adding 2^(W-AW) = 2^9 therefore steps the address by
// one. The programming sequence uses exactly that.
//
// The original clocks PR from a multiplexed clock: Fclock in Generation mode, the RAM write
// pulse in Programming mode. This version uses the single clock clk and a clock enable
// ck_en that the mode selector drives the same way. Clearing on rst matches the register's
// clear input in the original. Making that clear synchronous is this design's own choice.
//
// Timing: phase and addr change on the edge where ck_en is sampled high.
module phase_register
  import awg_pkg::*;
#(
  parameter int unsigned W  = PHASE_W,  // 24
  parameter int unsigned AW = ADDR_W    // 15
) (
  input  logic          clk,
  input  logic          por_n,
  input  logic          rst,     // system reset RST, synchronous clear
  input  logic          ck_en,   // advance the phase this cycle
  input  logic [W-1:0]  d,       // next phase from the adder
  output logic [W-1:0]  phase,   // PR contents R0..R23
  output logic [AW-1:0] addr     // RAM address, PR[W-1 -: AW]
);

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n)     phase <= '0;
    else if (rst)   phase <= '0;
    else if (ck_en) phase <= d;
  end

  assign addr = phase[W-1 -: AW];

endmodule
