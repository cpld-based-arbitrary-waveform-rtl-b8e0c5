// tb_awg_top: end-to-end test of the whole generator at its full size.
//
// The test plays the host PC through the parallel-port lines and runs the generator's
// complete use:
//   1. Programming mode, system reset, PIR = 2^9. Then all 32768 samples of one sine cycle
//      (12-bit, full scale), each written as a low byte followed by a high nibble.
//   2. Generation mode with M = 2^9. The address then steps by one per clock, so the DAC
//      reads the whole RAM back in order. Every sample is checked at the DAC input, and the
//      DAC voltage is checked too.
//   3. Back to Programming mode, M = (2^24 - 1) / 10 = 1677721 (the 1 MHz maximum at
//      Fclk = 10 MHz), Generation mode. Every clock for 100000 clocks the test checks the
//      phase step, the sample read and the output period of 10 to 11 clocks.
//   4. Reset, M = 1 (the 0.6 Hz minimum). One full output cycle, 2^24 clocks: each address
//      lasts 512 clocks and the phase wraps exactly once.
// The expected samples come from $sin, independently of the design. The test counts each
// mechanism it exercises (address and data writes, reset, PIR byte loads, both lane writes,
// programming-mode address steps, both mode switches, phase wraps) and fails if one never
// happened.
module tb_awg_top;
  import awg_pkg::*;

  localparam int NS = 1 << ADDR_W;  // 32768 samples

  logic clk = 1'b0, por_n = 1'b0;
  logic [7:0] pp_data = '0;
  logic pp_add = 1'b0, pp_iow = 1'b0;
  logic [11:0] dac_code;
  logic signed [31:0] dac_vout_uv;
  logic prog_mode, phase_wrap;
  logic [14:0] ram_addr;
  logic [23:0] phase;

  int checks = 0, failures = 0;
  logic [11:0] wave [NS];

  // mechanism counters
  int n_addr_wr = 0, n_data_wr = 0, n_reset = 0, n_pir_load = 0;
  int n_lane_lo = 0, n_lane_hi = 0, n_prog_step = 0, n_to_gen = 0, n_to_prog = 0, n_wrap = 0;

  awg_top dut (.*);

  always #50 clk = ~clk;  // 10 MHz

  logic prog_q = 1'b1, rst_q = 1'b0;
  always @(posedge clk) if (por_n) begin
    prog_q <= prog_mode;
    rst_q  <= dut.u_cpld.rst;
    if (prog_q && !prog_mode) n_to_gen++;
    if (!prog_q && prog_mode) n_to_prog++;
    if (dut.u_cpld.rst && !rst_q) n_reset++;
    if (!prog_mode && phase_wrap) n_wrap++;
    if (prog_mode && dut.u_cpld.ck_en) n_prog_step++;
    if (dut.u_cpld.ram_wr_n == 1'b0 && dut.u_cpld.ram_cs == 2'b01) n_lane_lo++;
    if (dut.u_cpld.ram_wr_n == 1'b0 && dut.u_cpld.ram_cs == 2'b10) n_lane_hi++;
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
    if (add) n_addr_wr++;
    else n_data_wr++;
  endtask

  task automatic set_reg(input logic [3:0] a); host_write(1'b1, {4'h0, a}); endtask

  task automatic load_m(input logic [23:0] m);
    set_reg(4'd0); host_write(1'b0, m[7:0]);
    set_reg(4'd1); host_write(1'b0, m[15:8]);
    set_reg(4'd2); host_write(1'b0, m[23:16]);
    n_pir_load += 3;
  endtask

  task automatic set_mode(input bit prog);
    set_reg(4'd4);
    host_write(1'b0, {7'd0, prog});
    check(prog_mode == prog, "mode switch");
  endtask

  task automatic sys_reset();
    set_reg(4'd8);
    check(phase == 0, "reset clears the phase");
    set_reg(4'd0);
  endtask

  function automatic int ideal_uv(input int c);
    real v;
    v = -5.0e6 + real'(c) * 1.0e7 / 4095.0;
    return $rtoi(v + (v >= 0 ? 0.5 : -0.5));
  endfunction

  // Run n clocks in Generation mode from the current state, checking the phase step,
  // the address, the sample at the DAC input one clock later and the voltage one more
  // clock later. Returns the number of phase wraps seen.
  task automatic run_gen(input logic [23:0] m, input int n, output int wraps,
                         output int min_per, output int max_per);
    logic [23:0] p_prev;
    logic [14:0] a1, a2;
    int last_wrap;
    wraps = 0;
    min_per = 1 << 30;
    max_per = 0;
    last_wrap = -1;
    @(negedge clk);
    p_prev = phase;
    a1 = ram_addr;
    a2 = ram_addr;
    for (int i = 0; i < n; i++) begin
      if (phase_wrap) begin
        wraps++;
        if (last_wrap >= 0) begin
          if (i - last_wrap < min_per) min_per = i - last_wrap;
          if (i - last_wrap > max_per) max_per = i - last_wrap;
        end
        last_wrap = i;
      end
      @(negedge clk);
      check(phase == p_prev + m, "phase grows by M each clock");
      check(ram_addr == phase[23:9], "address is PR[23:9]");
      check(dac_code == wave[a1], $sformatf("DAC input %h, expected sample %0d = %h",
                                           dac_code, a1, wave[a1]));
      if (i > 0) check(dac_vout_uv == ideal_uv(int'(wave[a2])), "DAC voltage");
      a2 = a1;
      a1 = ram_addr;
      p_prev = phase;
    end
  endtask

  initial begin
    int wraps, min_per, max_per;
    logic [23:0] m;
    for (int a = 0; a < NS; a++)
      wave[a] = 12'($rtoi(2047.5 + 2047.0 * $sin(2.0 * 3.14159265358979 * a / NS) + 0.5));

    repeat (3) @(negedge clk);
    por_n = 1'b1;
    // 1. program the whole RAM
    set_mode(1'b1);
    sys_reset();
    load_m(24'd512);
    set_reg(4'd5);
    for (int a = 0; a < NS; a++) begin
      check(ram_addr == 15'(a), "programming address");
      host_write(1'b0, wave[a][7:0]);
      host_write(1'b0, {4'h0, wave[a][11:8]});
    end
    check(ram_addr == 15'd0, "address wrapped after 32K samples");
    $display("programmed %0d samples", NS);

    // 2. read back the whole RAM at one address per clock
    set_reg(4'd4);
    host_write(1'b0, 8'h00);
    check(!prog_mode, "Generation mode");
    run_gen(24'd512, NS + 8, wraps, min_per, max_per);
    check(wraps == 1, $sformatf("read-back: one wrap per 32K clocks (%0d)", wraps));

    // 3. maximum frequency
    set_mode(1'b1);
    m = 24'((2 ** 24 - 1) / 10);
    load_m(m);
    sys_reset();
    set_mode(1'b0);
    run_gen(m, 100000, wraps, min_per, max_per);
    $display("M=%0d: %0d cycles in 100000 clocks, period %0d..%0d clocks", m, wraps, min_per,
             max_per);
    check(min_per >= 10 && max_per <= 11, "1 MHz: 10 to 11 clocks per cycle");
    check(wraps >= 9999 && wraps <= 10001, "1 MHz: about 10000 cycles in 10 ms");

    // 4. minimum frequency: one full cycle of 2^24 clocks
    set_mode(1'b1);
    load_m(24'd1);
    sys_reset();
    set_mode(1'b0);
    begin
      int wr_seen, start_wraps, cyc;
      logic [23:0] p0;
      @(negedge clk);
      p0 = phase;
      start_wraps = n_wrap;
      for (cyc = 1; cyc <= (1 << 24); cyc++) begin
        @(negedge clk);
        if ((cyc & 32'hFFFF) == 0 || cyc == (1 << 24))
          check(phase == 24'(p0 + cyc) && ram_addr == phase[23:9], "M=1 phase and address");
      end
      check(n_wrap - start_wraps == 1, $sformatf("M=1: one wrap in 2^24 clocks (%0d)",
                                                 n_wrap - start_wraps));
    end

    check(n_addr_wr > 0, "address writes happened");
    check(n_data_wr > 0, "data writes happened");
    check(n_reset >= 3, "system resets happened");
    check(n_pir_load > 0, "PIR loads happened");
    check(n_lane_lo == NS && n_lane_hi == NS, "low and high lane writes, one of each per sample");
    check(n_prog_step == NS, "programming address steps, one per sample");
    check(n_to_gen >= 3 && n_to_prog >= 2, "mode switches both ways");
    check(n_wrap > 10000, "phase wraps");
    $display("mechanisms: addr_wr=%0d data_wr=%0d reset=%0d pir_bytes=%0d lane_lo=%0d lane_hi=%0d",
             n_addr_wr, n_data_wr, n_reset, n_pir_load, n_lane_lo, n_lane_hi);
    $display("mechanisms: prog_steps=%0d to_gen=%0d to_prog=%0d wraps=%0d",
             n_prog_step, n_to_gen, n_to_prog, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
