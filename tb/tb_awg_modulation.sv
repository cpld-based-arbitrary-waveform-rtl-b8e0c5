// tb_awg_modulation: AM and FM output, the use the large waveform RAM is sized for.
//
// The RAM holds many carrier cycles under each modulation cycle. The carrier has 10 samples
// per cycle, so at one address per clock (M = 2^9) it is Fclk / 10 = 1 MHz. The modulation
// period is R carrier cycles. The test programs the RAM at the two ends of the usable range,
// R = 100 (10 kHz modulation) and R = 3200 (about 312 Hz, 32000 samples). Each time it
// writes the whole 32K RAM through the host port, switches to Generation mode at M = 2^9 and
// records the DAC input for 32000 clocks. It checks:
//   - every sample against the programmed formula
//   - the carrier: 3200 cycles in 32000 clocks, an upward mid-scale crossing every 10 clocks
//   - the modulation: the peak of each carrier cycle follows the envelope, with
//     32000 / (10 R) envelope maxima, and a depth (max/min peak) close to the one programmed.
// Samples: s(a) = round(2047.5 + 2000 * e(a) * sin(2 pi a / 10 + pi / 10)),
//          e(a) = (1 + 0.8 * sin(2 pi a / (10 R))) / 1.8.
// The pi/10 offset keeps samples away from exact mid-scale.
// FM, modulation ratio 100, carrier 0.1 cycle/sample with +/-20 % deviation:
//   s(a) = round(2047.5 + 2000 * sin(2 pi p(a) + pi / 10)),
//   p(a) = a / 10 + (0.02 * 1000 / (2 pi)) * (1 - cos(2 pi a / 1000)).
// There the test checks every sample, 3200 carrier cycles in 32000 clocks (32 whole
// modulation cycles), and carrier periods ranging from at most 9 to at least 12 clocks.
module tb_awg_modulation;
  import awg_pkg::*;

  localparam int NS = 1 << ADDR_W;
  localparam real PI = 3.14159265358979;

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
  logic [11:0] rec [32000];

  awg_top dut (.*);

  always #50 clk = ~clk;

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
    repeat (3) @(negedge clk);
    pp_iow = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic set_reg(input logic [3:0] a); host_write(1'b1, {4'h0, a}); endtask

  task automatic run_ratio(input int r);
    int ups, env_max, n_env_peaks, pk_max, pk_min, i0;
    int peaks [3200];
    bit rising;
    for (int a = 0; a < NS; a++) begin
      real e;
      e = (1.0 + 0.8 * $sin(2.0 * PI * a / (10.0 * r))) / 1.8;
      wave[a] = 12'($rtoi(2047.5 + 2000.0 * e * $sin(2.0 * PI * a / 10.0 + PI / 10.0) + 0.5));
    end
    program_and_record();
    i0 = 0;
    for (int i = 0; i < 32000; i++) check(rec[i] == wave[i], $sformatf("sample %0d", i));
    // carrier: upward crossings of mid-scale
    ups = 0;
    for (int i = 1; i < 32000; i++)
      if (rec[i - 1] < 12'd2048 && rec[i] >= 12'd2048) begin
        ups++;
        if (ups > 1) check(i - i0 == 10, "carrier period 10 clocks (1 MHz)");
        i0 = i;
      end
    // sample 0 is already above mid-scale, so 3200 cycles show 3199 crossings
    check(ups == 3199, $sformatf("3200 carrier cycles in 32000 clocks (%0d crossings)", ups));
    // envelope: peak of each carrier cycle
    pk_max = 0;
    pk_min = 4096;
    for (int c = 0; c < 3200; c++) begin
      int pk;
      pk = 0;
      for (int k = 0; k < 10; k++) begin
        int d;
        d = int'(rec[10 * c + k]) - 2048;
        if (d < 0) d = -d;
        if (d > pk) pk = d;
      end
      peaks[c] = pk;
      if (pk > pk_max) pk_max = pk;
      if (pk < pk_min) pk_min = pk;
    end
    // modulation cycles: upward crossings of the envelope mid-level, with hysteresis
    env_max = (pk_max + pk_min) / 2;
    n_env_peaks = 0;
    rising = 1'b0;
    for (int c = 0; c < 3200; c++) begin
      if (!rising && peaks[c] > env_max + (pk_max - pk_min) / 8) begin
        rising = 1'b1;
        n_env_peaks++;
      end else if (rising && peaks[c] < env_max - (pk_max - pk_min) / 8) rising = 1'b0;
    end
    $display("R=%0d: carrier cycles %0d, modulation cycles %0d, peak %0d..%0d", r, ups,
             n_env_peaks, pk_min, pk_max);
    check(n_env_peaks == 32000 / (10 * r), $sformatf("%0d modulation cycles", 32000 / (10 * r)));
    // depth: ideal ratio (1 + 0.8) / (1 - 0.8) = 9; the 10-sample peak is at most 5 % short
    check(pk_max * 10 >= pk_min * 80 && pk_max * 10 <= pk_min * 100, "modulation depth");
  endtask

  // Programming mode, reset, M = 2^9, all samples; reset the phase so the sweep starts at
  // address 0, Generation mode, then record the DAC input for 32000 clocks
  task automatic program_and_record();
    set_reg(4'd4); host_write(1'b0, 8'h01);
    set_reg(4'd8); set_reg(4'd0);
    set_reg(4'd0); host_write(1'b0, 8'h00);
    set_reg(4'd1); host_write(1'b0, 8'h02);
    set_reg(4'd2); host_write(1'b0, 8'h00);
    set_reg(4'd5);
    for (int a = 0; a < NS; a++) begin
      host_write(1'b0, wave[a][7:0]);
      host_write(1'b0, {4'h0, wave[a][11:8]});
    end
    set_reg(4'd8); set_reg(4'd0);
    set_reg(4'd4);
    pp_add = 1'b0;
    pp_data = 8'h00;
    repeat (3) @(negedge clk);
    pp_iow = 1'b1;
    while (prog_mode) @(negedge clk);
    for (int i = 0; i < 32000; i++) begin
      @(negedge clk);
      rec[i] = dac_code;
    end
    pp_iow = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic run_fm();
    int ups, i0, pmin, pmax;
    for (int a = 0; a < NS; a++) begin
      real p;
      p = a / 10.0 + (0.02 * 1000.0 / (2.0 * PI)) * (1.0 - $cos(2.0 * PI * a / 1000.0));
      wave[a] = 12'($rtoi(2047.5 + 2000.0 * $sin(2.0 * PI * p + PI / 10.0) + 0.5));
    end
    program_and_record();
    for (int i = 0; i < 32000; i++) check(rec[i] == wave[i], $sformatf("FM sample %0d", i));
    ups = 0;
    i0 = 0;
    pmin = 1000;
    pmax = 0;
    for (int i = 1; i < 32000; i++)
      if (rec[i - 1] < 12'd2048 && rec[i] >= 12'd2048) begin
        ups++;
        if (ups > 1) begin
          if (i - i0 < pmin) pmin = i - i0;
          if (i - i0 > pmax) pmax = i - i0;
        end
        i0 = i;
      end
    $display("FM: %0d crossings, carrier period %0d..%0d clocks", ups, pmin, pmax);
    check(ups == 3199, $sformatf("FM: 3200 carrier cycles in 32000 clocks (%0d crossings)", ups));
    check(pmin <= 9 && pmax >= 12 && pmin >= 8 && pmax <= 13, "FM: carrier period deviates");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    por_n = 1'b1;
    run_ratio(100);
    run_ratio(3200);
    run_fm();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
