// awg_cpld: the programmable-logic part of the generator.
//
// It holds the phase accumulator (PIR, adder, PR) and the host interface (address/data
// decoder, mode selector, data buffer). Its pins follow the board: the host's 8-bit data plus
// Add/Data and IOW on one side, the RAM address ADD0..ADD14, data D0..D11 and the WR!, CS and
// OE! controls on the other.
//
// Generation mode: every clk cycle PR <= PR + M, and PR[23:9] addresses the RAM. The output
// frequency is Fclk * M / 2^24.
// Programming mode: each pair of data bytes written to register 5 stores one sample at the
// current address. The PR then adds the PIR once. With M = 2^9 the address steps by one.
//
// The block structure and register map follow the original circuit. Using one clock with clock enables
// in place of the original's switched clock is this design's own choice. The outputs phase and
// phase_wrap are observation points added for test and status; the original has no such pins.
//
// Timing: the RAM address is PR[23:9] straight from the register, stable for a whole cycle.
// A host write reaches the RAM 3 clk cycles after IOW rises.
module awg_cpld
  import awg_pkg::*;
(
  input  logic               clk,
  input  logic               por_n,
  input  logic [BYTE_W-1:0]  pp_data,
  input  logic               pp_add,
  input  logic               pp_iow,
  output logic [ADDR_W-1:0]  ram_addr,   // ADD0..ADD14
  output logic [DATA_W-1:0]  ram_wdata,  // D0..D11 driven by the buffer
  output logic               ram_wr_n,   // WR!
  output logic [1:0]         ram_cs,     // CS1, CS2 (lane selects, active high)
  output logic               ram_oe_n,   // OE!
  output logic               prog_mode,  // CTL0: 1 = Programming, 0 = Generation
  output logic [PHASE_W-1:0] phase,      // PR contents
  output logic               phase_wrap  // adder carry out while PR advances
);

  logic [7:0]         y;  // Y3, Y6 and Y7 decode to no register
  logic               rst, data_wr;
  logic [BYTE_W-1:0]  wbyte;
  logic [PHASE_W-1:0] m, sum;
  logic               co, ck_en, buf_en;

  add_data_decoder u_dec (
    .clk, .por_n, .pp_data, .pp_add, .pp_iow,
    .y, .rst, .data_wr, .wdata(wbyte)
  );

  pir u_pir (
    .clk, .por_n,
    .sel({y[REG_PIR2], y[REG_PIR1], y[REG_PIR0]}),
    .wr(data_wr), .din(wbyte), .m
  );

  phase_adder u_add (.a(m), .b(phase), .s(sum), .co);

  phase_register u_pr (
    .clk, .por_n, .rst, .ck_en, .d(sum), .phase, .addr(ram_addr)
  );

  mode_selector u_mode (
    .clk, .por_n, .rst,
    .sel_mode(y[REG_MODE]), .sel_ram(y[REG_RAM]), .data_wr, .bit0(wbyte[0]),
    .ctl0(prog_mode), .ck_en, .ram_wr_n, .ram_cs, .ram_oe_n, .buf_en
  );

  data_buffer u_buf (.en(buf_en), .din(wbyte), .dbus(ram_wdata));

  assign phase_wrap = co & ck_en & ~rst;

endmodule
