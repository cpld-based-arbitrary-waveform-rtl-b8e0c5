// mode_selector: Programming / Generation mode control.
//
// Holds the mode bit CTL0, written from bit 0 of a data byte sent to register 4 (select Y4).
// CTL0 = 1 is Programming mode: the host writes the waveform into RAM. CTL0 = 0 is Generation
// mode: the RAM is read at the clock rate and feeds the DAC.
//
// In Programming mode a 12-bit sample takes two data writes to register 5 (Y5). The first
// goes to the low RAM lane D0..D7 (chip select cs[0]) and the second to the high lane
// D8..D11 (cs[1]). A lane toggle, cleared by RST, tracks which write comes next. The second
// write also pulses ck_en, so the Phase Register adds the PIR once after each complete
// sample. With PIR = 2^9 that steps the RAM address by one per sample. In Generation mode
// ck_en is high on every clock, both chip selects are active, writes are blocked and the RAM
// outputs are enabled.
//
// From the original circuit: CTL0 from bit 0 under Y4; the PR advance chosen by CTL0 between the clock
// and the Y5 write pulse; OE! driven from CTL0; the data buffer enabled from Y5 and CTL0; two
// chip selects with a toggle stage. The order of the lanes (low byte first), advancing PR on
// the second write only, the power-on value CTL0 = 1, and doing all this with clock enables
// rather than a switched clock are this design's own choices.
//
// Timing: all outputs except ctl0 are combinational in the inputs of the same
// cycle. data_wr is a one-cycle strobe, so ram_wr_n is low for exactly one cycle per write.
module mode_selector (
  input  logic       clk,
  input  logic       por_n,
  input  logic       rst,       // system reset RST
  input  logic       sel_mode,  // Y4
  input  logic       sel_ram,   // Y5
  input  logic       data_wr,   // one-cycle data write strobe
  input  logic       bit0,      // data bus bit 0
  output logic       ctl0,      // 1 = Programming mode, 0 = Generation mode
  output logic       ck_en,     // Phase Register advance
  output logic       ram_wr_n,  // RAM write strobe, active low (WR!)
  output logic [1:0] ram_cs,    // RAM lane chip selects, active high: [0] D0..D7, [1] D8..D11
  output logic       ram_oe_n,  // RAM output enable, active low (OE!)
  output logic       buf_en     // data buffer drive enable
);

  logic ram_write;
  logic lane_hi;  // next sample write goes to the high lane

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n)                   ctl0 <= 1'b1;
    else if (sel_mode && data_wr) ctl0 <= bit0;
  end

  assign ram_write = ctl0 & sel_ram & data_wr;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n)         lane_hi <= 1'b0;
    else if (rst)       lane_hi <= 1'b0;
    else if (ram_write) lane_hi <= ~lane_hi;
  end

  always_comb begin
    buf_en   = ctl0 & sel_ram;
    ram_oe_n = ctl0;
    ram_wr_n = ~ram_write;
    if (ctl0) begin
      ram_cs = lane_hi ? 2'b10 : 2'b01;
      ck_en  = ram_write & lane_hi;
    end else begin
      ram_cs = 2'b11;
      ck_en  = 1'b1;
    end
  end

  // RAM writes happen only in Programming mode, and then to exactly one lane
  a_write_in_prog: assert property (@(posedge clk) disable iff (!por_n)
    !ram_wr_n |-> ctl0 && $onehot(ram_cs));
  // the RAM drives its outputs only in Generation mode, and is never written then
  a_oe_no_write: assert property (@(posedge clk) disable iff (!por_n)
    !ram_oe_n |-> ram_wr_n);

endmodule
