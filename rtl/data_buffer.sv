// data_buffer: host byte to RAM data bus driver ("BUFFER").
//
// In Programming mode the CPLD drives the 12-bit RAM data bus from the 8-bit host byte:
// bits [7:0] go to D0..D7 and bits [3:0] again to D8..D11. The chip selects then decide which
// lane a write stores. This lane wiring follows the original circuit. The original uses tri-state
// drivers on a shared bus. Here the bus is a separate write bus, driven to 0 when the buffer
// is disabled, a choice of this design. Purely combinational.
module data_buffer
  import awg_pkg::*;
(
  input  logic              en,     // drive enable (Y5 and Programming mode)
  input  logic [BYTE_W-1:0] din,    // host byte
  output logic [DATA_W-1:0] dbus    // RAM write data D0..D11
);

  always_comb begin
    if (en) dbus = {din[HI_W-1:0], din[LO_W-1:0]};
    else    dbus = '0;
  end

endmodule
