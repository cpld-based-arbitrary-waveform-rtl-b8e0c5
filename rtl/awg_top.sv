// awg_top: DDS arbitrary waveform generator, board level.
//
// A host PC programs an arbitrary waveform, 32K samples of 12 bits, into the waveform RAM
// through its parallel port, and sets the 24-bit tuning word M. It then switches the board
// to Generation mode, and the board runs alone. Every clock the phase accumulator adds M, its
// top 15 bits address the RAM, and the sample read goes to the 12-bit DAC. The output
// frequency is Fclk * M / 2^24: with Fclk = 10 MHz, 0.6 Hz for M = 1 and 1 MHz for
// M = (2^24 - 1) / 10, which still gives 10 samples per cycle.
//
// Contents: awg_cpld (the programmable logic), wave_ram (32K x 12) and dac12_model (a
// behavioural model of the DAC). The analog amplifier and low-pass filter after the DAC are
// not modelled. dac_code is the digital word at the DAC input, and dac_vout_uv is the model's
// staircase voltage in microvolts.
//
// Host protocol, one write cycle = raise pp_iow with pp_data and pp_add already set, then
// lower it:
//   address write: pp_add = 1, pp_data[2:0] = register, pp_data[3] = system reset
//   data write:    pp_add = 0, pp_data = byte for the addressed register
// Programming sequence: mode 1, reset (address 8 then 0), M = 2^9, 2 bytes per sample
// (low byte, then high nibble) for every address, the wanted M, mode 0.
//
// Timing in Generation mode: the RAM address is taken from PR in cycle t. The sample appears
// on dac_code in cycle t+1, and the DAC latches it so that dac_vout_uv shows it in cycle t+2.
module awg_top
  import awg_pkg::*;
(
  input  logic               clk,          // Fclock, 10 MHz
  input  logic               por_n,        // power-on reset, active low
  input  logic [BYTE_W-1:0]  pp_data,      // parallel-port data lines
  input  logic               pp_add,       // Add/Data control line
  input  logic               pp_iow,       // IOW control line
  output logic [DATA_W-1:0]  dac_code,     // RAM data into the DAC
  output logic signed [31:0] dac_vout_uv,  // DAC output, microvolts
  output logic               prog_mode,    // 1 = Programming, 0 = Generation
  output logic [ADDR_W-1:0]  ram_addr,     // current RAM address
  output logic [PHASE_W-1:0] phase,        // Phase Register contents
  output logic               phase_wrap    // one pulse per waveform cycle
);

  logic [DATA_W-1:0]  ram_wdata;
  logic               ram_wr_n, ram_oe_n;
  logic [1:0]         ram_cs;

  awg_cpld u_cpld (
    .clk, .por_n, .pp_data, .pp_add, .pp_iow,
    .ram_addr, .ram_wdata, .ram_wr_n, .ram_cs, .ram_oe_n,
    .prog_mode, .phase, .phase_wrap
  );

  wave_ram u_ram (
    .clk, .addr(ram_addr), .wdata(ram_wdata), .wr_n(ram_wr_n), .cs(ram_cs), .oe_n(ram_oe_n),
    .rdata(dac_code)
  );

  dac12_model u_dac (.clk, .code(dac_code), .vout_uv(dac_vout_uv));

endmodule
