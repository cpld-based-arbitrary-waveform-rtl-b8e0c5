// pir: Phase Increment Register.
//
// Holds the 24-bit tuning word M that the phase accumulator adds to the Phase Register on
// every step. The host loads it one byte at a time through three select lines from the
// address decoder: sel[0] (Y0) loads M[7:0], sel[1] (Y1) loads M[15:8], sel[2] (Y2) loads
// M[23:16]. A byte is taken on the clock edge where wr and the select are both high. The byte
// lanes and their selects follow the original. The power-on clear to 0 is this design's own. The
// system reset RST does not touch the PIR, so M survives a reset, as in the original.
//
// Timing: m shows the new byte on the clock edge after the write cycle.
module pir
  import awg_pkg::*;
#(
  parameter int unsigned W = PHASE_W  // 24; must be a multiple of BYTE_W
) (
  input  logic                clk,
  input  logic                por_n,
  input  logic [W/BYTE_W-1:0] sel,    // byte select, one per byte lane
  input  logic                wr,     // write strobe
  input  logic [BYTE_W-1:0]   din,    // byte from the host bus
  output logic [W-1:0]        m       // tuning word M
);

  localparam int unsigned NB = W / BYTE_W;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) m <= '0;
    else if (wr) begin
      for (int b = 0; b < NB; b++)
        if (sel[b]) m[b*BYTE_W +: BYTE_W] <= din;
    end
  end

  initial assert (W % BYTE_W == 0) else $error("pir: W must be a multiple of %0d", BYTE_W);

endmodule
