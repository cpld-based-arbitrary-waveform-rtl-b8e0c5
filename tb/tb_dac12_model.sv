// tb_dac12_model: self-checking test of the DAC model.
//
// Checks the end points (-5 V, +5 V), the one-LSB step of about 2.44 mV, the one-clock latch
// and random codes against the ideal transfer function computed in real arithmetic.
module tb_dac12_model;
  logic clk = 1'b0;
  logic [11:0] code = '0;
  logic signed [31:0] vout_uv;
  int checks = 0, failures = 0;

  dac12_model dut (.*);

  always #50 clk = ~clk;

  function automatic int ideal_uv(input int c);
    real v;
    v = -5.0e6 + real'(c) * 1.0e7 / 4095.0;
    return $rtoi(v + (v >= 0 ? 0.5 : -0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (vout_uv=%0d)", what, vout_uv);
    end
  endtask

  task automatic apply(input int c);
    @(negedge clk);
    code = 12'(c);
    @(posedge clk);
    #1;
  endtask

  initial begin
    int v0, v1;
    apply(0);
    check(vout_uv == -5_000_000, "code 0 is -5 V");
    apply(4095);
    check(vout_uv == 5_000_000, "code 4095 is +5 V");
    apply(2048);
    v0 = vout_uv;
    apply(2049);
    v1 = vout_uv;
    check(v1 - v0 >= 2441 && v1 - v0 <= 2443, "one LSB is about 2.44 mV");
    // latch: the output must not follow the input between clock edges
    @(negedge clk);
    code = 12'd0;
    #10;
    check(vout_uv == v1, "output held until the next clock edge");
    for (int i = 0; i < 1000; i++) begin
      int c;
      c = int'($urandom % 4096);
      apply(c);
      check(vout_uv - ideal_uv(c) <= 1 && ideal_uv(c) - vout_uv <= 1,
            $sformatf("code %0d expected %0d uV", c, ideal_uv(c)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
