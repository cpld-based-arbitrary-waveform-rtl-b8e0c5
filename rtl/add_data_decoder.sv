// add_data_decoder: host-bus front end ("ADD and DATA Decoder").
//
// The host drives an 8-bit data bus plus two control lines: Add/Data and IOW. A rising edge
// of IOW is one write cycle. With Add/Data set, the write loads the 4-bit address register
// from data[3:0]. Otherwise it is a data write, output as the one-cycle strobe data_wr together
// with the byte. The address register decodes continuously: bits [2:0] give a one-hot select
// y[7:0] (Y0..Y7), and bit 3 is the system reset rst, held while that bit stays set.
//
// The address register, the 3-to-8 select decode, bit 3 as RST, and Add/Data steering IOW
// between the address latch and the data strobe follow the original circuit. The
// original clocks its registers straight from IOW. This version samples the host lines with
// a two-flop synchroniser on clk and detects the IOW rising edge there instead. That choice
// is this design's own.
//
// Timing: data_wr and wdata are valid for one clk cycle, 3 clk edges after IOW rises. A new
// address drives y and rst on the same edge that would have given data_wr. The host must hold
// data and Add/Data steady for at least 3 clk cycles around the IOW rising edge.
module add_data_decoder
  import awg_pkg::*;
(
  input  logic              clk,
  input  logic              por_n,     // power-on reset, active low, asynchronous
  input  logic [BYTE_W-1:0] pp_data,   // parallel-port data lines (port 378h)
  input  logic              pp_add,    // Add/Data control line (37Ah bit 1): 1 = address
  input  logic              pp_iow,    // IOW control line (37Ah bit 0), rising edge = write
  output logic [7:0]        y,         // one-hot register select Y0..Y7
  output logic              rst,       // system reset RST, from address bit 3
  output logic              data_wr,   // one-cycle data write strobe (IOW! in the original)
  output logic [BYTE_W-1:0] wdata      // byte captured with the write
);

  logic [BYTE_W-1:0] data_s1, data_s2;
  logic              add_s1, add_s2;
  logic [2:0]        iow_sh;  // synchroniser (2 flops) plus one edge-detect flop
  logic [3:0]        addr_q;
  logic              iow_rise;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      data_s1 <= '0;
      data_s2 <= '0;
      add_s1  <= 1'b0;
      add_s2  <= 1'b0;
      iow_sh  <= '0;
    end else begin
      data_s1 <= pp_data;
      data_s2 <= data_s1;
      add_s1  <= pp_add;
      add_s2  <= add_s1;
      iow_sh  <= {iow_sh[1:0], pp_iow};
    end
  end

  assign iow_rise = iow_sh[1] & ~iow_sh[2];

  // Address register; resets to 0 (select Y0, RST released)
  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n)                  addr_q <= '0;
    else if (iow_rise && add_s2) addr_q <= data_s2[3:0];
  end

  // Data write strobe and captured byte
  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      data_wr <= 1'b0;
      wdata   <= '0;
    end else begin
      data_wr <= iow_rise & ~add_s2;
      if (iow_rise && !add_s2) wdata <= data_s2;
    end
  end

  always_comb begin
    y = '0;
    y[addr_q[2:0]] = 1'b1;
  end

  assign rst = addr_q[RST_BIT];

  // exactly one register is selected at any time
  a_onehot_sel: assert property (@(posedge clk) disable iff (!por_n) $onehot(y));
  // a write cycle is either an address write or a data write, never both
  a_strobe_single: assert property (@(posedge clk) disable iff (!por_n)
    data_wr |-> $past(iow_rise) && !$past(add_s2));

endmodule
