// dac12_model: behavioural model of the 12-bit +/-5 V DAC. Not synthesizable logic: it stands
// in for an analog part.
//
// The DAC latches its input code on each Fclock rising edge and holds the corresponding
// voltage until the next one. The result is the staircase that the output low-pass filter
// smooths. Codes are offset binary over the full +/-5 V range: code 0 gives -5 V and code
// 4095 gives +5 V. One step is 10 V / 4095, about 2.44 mV. The voltage is reported as a
// signed integer in microvolts, rounded to the nearest one:
//   vout_uv = -5_000_000 + round(code * 10_000_000 / 4095).
// The 12-bit width, the +/-5 V range and the clocking at Fclock follow the original. The
// offset-binary coding and the one-cycle latch are this model's own choice.
module dac12_model
  import awg_pkg::*;
#(
  parameter int VFS_UV = 5_000_000  // half of the full-scale range, microvolts
) (
  input  logic                     clk,
  input  logic [DATA_W-1:0]        code,
  output logic signed [31:0]       vout_uv
);

  localparam longint CODE_MAX = (longint'(1) << DATA_W) - 1;  // 4095

  logic [DATA_W-1:0] code_q;

  always_ff @(posedge clk) code_q <= code;

  always_comb
    vout_uv = 32'(-longint'(VFS_UV) + ((longint'(code_q) * 2 * VFS_UV + CODE_MAX / 2) / CODE_MAX));

endmodule
