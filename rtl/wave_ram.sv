// wave_ram: the 32K x 12 waveform memory.
//
// Holds the samples of one or more waveform cycles: 2^AW words of LO_W + HI_W bits, indexed
// by the top bits of the Phase Register. It has two byte lanes with their own chip selects:
// cs[0] for D0..D7 and cs[1] for D8..D11. That lets an 8-bit host fill a 12-bit word in two
// writes. A lane is written on the clock edge where wr_n is low and its cs bit is high. A read
// happens on every clock edge where oe_n is low, and rdata shows mem[addr] one cycle later.
// While oe_n is high, rdata holds its last value.
//
// The size (32K x 12), the WR!/CS/OE! controls, the two chip-selected lanes and reading in step
// with Fclock follow the original. The original uses an external asynchronous SRAM. Making it a
// synchronous memory with a registered read is this design's own choice.
module wave_ram
  import awg_pkg::*;
#(
  parameter int unsigned AW   = ADDR_W,  // 15 -> 32K words
  parameter int unsigned LOW  = LO_W,    // 8
  parameter int unsigned HIW  = HI_W     // 4
) (
  input  logic               clk,
  input  logic [AW-1:0]      addr,
  input  logic [LOW+HIW-1:0] wdata,
  input  logic               wr_n,   // write strobe, active low
  input  logic [1:0]         cs,     // lane selects, active high
  input  logic               oe_n,   // read enable, active low
  output logic [LOW+HIW-1:0] rdata
);

  logic [LOW-1:0] mem_lo [2**AW];
  logic [HIW-1:0] mem_hi [2**AW];

  always_ff @(posedge clk) begin
    if (!wr_n && cs[0]) mem_lo[addr] <= wdata[LOW-1:0];
    if (!wr_n && cs[1]) mem_hi[addr] <= wdata[LOW+HIW-1:LOW];
  end

  always_ff @(posedge clk) begin
    if (!oe_n) rdata <= {mem_hi[addr], mem_lo[addr]};
  end

endmodule
