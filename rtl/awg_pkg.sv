// awg_pkg: sizes and register map shared by the DDS arbitrary waveform generator.
//
// The generator is a direct digital synthesiser: a 24-bit phase accumulator steps through a
// 32K x 12 waveform RAM whose samples feed a 12-bit DAC. The host writes to it over an 8-bit
// parallel-port bus. It first sends a register address (Add/Data set), then data bytes to that
// register. The widths below are the ones the design is built around: 24-bit phase, 15-bit RAM
// address taken from the phase MSBs, 12-bit samples, 8-bit host bus.
//
// Register map: addresses 0, 1 and 2 load the tuning word M, low byte first; 4 is the mode bit;
// 5 is the RAM data port. Address bit 3 is not a register. While it is set in the latched
// address, it holds the system reset. Addresses 3, 6 and 7 decode but drive nothing.
package awg_pkg;

  localparam int unsigned PHASE_W = 24;  // phase accumulator, PIR and adder width
  localparam int unsigned ADDR_W  = 15;  // RAM address: PR[23:9]
  localparam int unsigned DATA_W  = 12;  // sample and DAC width
  localparam int unsigned BYTE_W  = 8;   // parallel-port data width
  localparam int unsigned LO_W    = 8;   // RAM low lane, D0..D7
  localparam int unsigned HI_W    = DATA_W - LO_W;  // RAM high lane, D8..D11

  // Decoded register selects Y0..Y7 (value of the 3 low bits of the latched address)
  typedef enum logic [2:0] {
    REG_PIR0  = 3'd0,  // M[7:0]
    REG_PIR1  = 3'd1,  // M[15:8]
    REG_PIR2  = 3'd2,  // M[23:16]
    REG_NONE3 = 3'd3,
    REG_MODE  = 3'd4,  // bit 0 -> CTL0 (1 = Programming, 0 = Generation)
    REG_RAM   = 3'd5,  // waveform sample bytes
    REG_NONE6 = 3'd6,
    REG_NONE7 = 3'd7
  } reg_sel_e;

  localparam int unsigned RST_BIT = 3;  // address bit that drives the system reset

endpackage
