// tb_wave_ram: self-checking test of the 32K x 12 waveform memory.
//
// Fills every word through the two lanes (low lane, then high lane, as the host does), with
// a pattern computed from the address, reads it all back with the one-cycle read latency,
// checks that a single-lane write leaves the other lane alone (both ways) and that rdata holds while
// oe_n is high.
module tb_wave_ram;
  localparam int N = 1 << 15;
  logic clk = 1'b0;
  logic [14:0] addr = '0;
  logic [11:0] wdata = '0, rdata;
  logic wr_n = 1'b1, oe_n = 1'b1;
  logic [1:0] cs = '0;
  int checks = 0, failures = 0;

  wave_ram dut (.*);

  always #50 clk = ~clk;

  function automatic logic [11:0] pat(input int a);
    return 12'((a * 2654435761) >> 7) ^ 12'(a);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [11:0] held;
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      addr = 15'(a); wdata = {4'hA, pat(a)[7:0]}; cs = 2'b01; wr_n = 1'b0;
      @(negedge clk);
      wdata = {pat(a)[11:8], 8'h55}; cs = 2'b10;
    end
    @(negedge clk);
    wr_n = 1'b1; cs = 2'b11; oe_n = 1'b0;
    for (int a = 0; a < N; a++) begin
      addr = 15'(a);
      @(posedge clk);
      #1 check(rdata == pat(a), $sformatf("read %0d: %h expected %h", a, rdata, pat(a)));
      @(negedge clk);
    end
    // lane independence: rewrite the high lane of word 7 only
    addr = 15'd7; wdata = 12'hF00; cs = 2'b10; wr_n = 1'b0;
    @(negedge clk);
    wr_n = 1'b1; cs = 2'b11;
    @(posedge clk);
    #1 check(rdata == {4'hF, pat(7)[7:0]}, "high-lane write keeps low lane");
    // and the other way round: low lane of word 9 only, with other bits on the high lane
    @(negedge clk);
    addr = 15'd9; wdata = 12'h377; cs = 2'b01; wr_n = 1'b0;
    @(negedge clk);
    wr_n = 1'b1; cs = 2'b11;
    @(posedge clk);
    #1 check(rdata == {pat(9)[11:8], 8'h77}, "low-lane write keeps high lane");
    // hold while disabled
    @(negedge clk);
    held = rdata; oe_n = 1'b1; addr = 15'd100;
    @(posedge clk);
    #1 check(rdata == held, "rdata holds with oe_n high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
