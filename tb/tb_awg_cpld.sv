// tb_awg_cpld: self-checking test of the programmable-logic part on its own.
//
// The test plays the host: Programming mode, reset, PIR = 2^9, then 64 samples of two bytes
// each. A shadow RAM built from the CPLD's RAM pins (WR!, CS, address, data) must then hold
// each sample at consecutive addresses. The test then loads a random tuning word and switches
// to Generation mode. There the phase must grow by M every clock, the RAM address must be
// PR[23:9], OE! must be low and phase_wrap must pulse exactly when the phase overflows. A
// reset in Generation mode must clear the phase.
module tb_awg_cpld;
  import awg_pkg::*;

  logic clk = 1'b0, por_n = 1'b0;
  logic [7:0] pp_data = '0;
  logic pp_add = 1'b0, pp_iow = 1'b0;
  logic [14:0] ram_addr;
  logic [11:0] ram_wdata;
  logic ram_wr_n, ram_oe_n, prog_mode, phase_wrap;
  logic [1:0] ram_cs;
  logic [23:0] phase;
  int checks = 0, failures = 0;

  logic [7:0] shadow_lo [64];
  logic [3:0] shadow_hi [64];
  int bad_addr = 0;

  awg_cpld dut (.*);

  always #50 clk = ~clk;

  always @(posedge clk) begin
    if (!ram_wr_n) begin
      if (ram_addr < 64) begin
        if (ram_cs[0]) shadow_lo[ram_addr[5:0]] <= ram_wdata[7:0];
        if (ram_cs[1]) shadow_hi[ram_addr[5:0]] <= ram_wdata[11:8];
      end else bad_addr++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic host_write(input bit add, input logic [7:0] b);
    pp_add = add;
    pp_data = b;
    repeat (3) @(negedge clk);
    pp_iow = 1'b1;
    repeat (4) @(negedge clk);
    pp_iow = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  task automatic set_reg(input logic [3:0] a); host_write(1'b1, {4'h0, a}); endtask

  task automatic load_m(input logic [23:0] m);
    set_reg(4'd0); host_write(1'b0, m[7:0]);
    set_reg(4'd1); host_write(1'b0, m[15:8]);
    set_reg(4'd2); host_write(1'b0, m[23:16]);
  endtask

  function automatic logic [11:0] sample(input int a);
    return 12'(a * 97 + 5);
  endfunction

  initial begin
    logic [23:0] m, p_prev;
    int wraps, exp_wraps;
    repeat (3) @(negedge clk);
    por_n = 1'b1;
    set_reg(4'd4); host_write(1'b0, 8'h01);       // Programming mode
    check(prog_mode && ram_oe_n, "Programming mode");
    set_reg(4'd8); set_reg(4'd0);                 // reset
    check(phase == 0, "reset clears PR");
    load_m(24'h000200);                           // 2^9
    set_reg(4'd5);
    for (int a = 0; a < 64; a++) begin
      host_write(1'b0, sample(a)[7:0]);
      check(ram_addr == 15'(a), "address holds after the low byte");
      host_write(1'b0, {4'h0, sample(a)[11:8]});
      check(ram_addr == 15'(a + 1), "address steps after the high nibble");
    end
    for (int a = 0; a < 64; a++)
      check({shadow_hi[a], shadow_lo[a]} == sample(a), $sformatf("stored sample %0d", a));
    check(bad_addr == 0, "no write outside the programmed range");
    // Generation mode with a random tuning word
    m = 24'($urandom) | 24'h100000;
    load_m(m);
    set_reg(4'd4);
    pp_add = 1'b0;
    pp_data = 8'h00;
    repeat (3) @(negedge clk);
    pp_iow = 1'b1;
    wraps = 0;
    exp_wraps = 0;
    // wait for the mode change, then follow the phase
    while (prog_mode) @(negedge clk);
    check(!ram_oe_n && ram_wr_n, "Generation: RAM read, no write");
    p_prev = phase;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(phase == p_prev + m, "phase grows by M each clock");
      check(ram_addr == phase[23:9], "RAM address is PR[23:9]");
      check(phase_wrap == (({1'b0, phase} + {1'b0, m}) > 25'hFFFFFF), "phase_wrap is the carry");
      if (phase_wrap) wraps++;
      if ({1'b0, p_prev} + {1'b0, m} > 25'hFFFFFF) exp_wraps++;
      p_prev = phase;
    end
    pp_iow = 1'b0;
    repeat (4) @(negedge clk);
    set_reg(4'd8);
    check(phase == 0, "reset in Generation mode clears PR");
    set_reg(4'd0);
    check(exp_wraps > 0 && wraps > 0, "the phase wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
