// tb_pir: self-checking test of the Phase Increment Register.
//
// Writes random bytes to random byte lanes, sometimes with the strobe low or with no lane
// selected, and compares M after every cycle with a reference word updated by the test.
module tb_pir;
  import awg_pkg::*;

  logic clk = 1'b0, por_n = 1'b0;
  logic [2:0] sel = '0;
  logic wr = 1'b0;
  logic [7:0] din = '0;
  logic [23:0] m;
  logic [23:0] ref_m;
  int checks = 0, failures = 0;

  pir dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    check_m(24'h0, "power-on clear");
    por_n = 1'b1;
    ref_m = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sel = 3'(1 << ($urandom % 4));   // lanes 0..2, or none
      wr  = ($urandom % 4) != 0;
      din = 8'($urandom);
      @(posedge clk);
      if (wr) begin
        if (sel[0]) ref_m[7:0]   = din;
        if (sel[1]) ref_m[15:8]  = din;
        if (sel[2]) ref_m[23:16] = din;
      end
      #1 check_m(ref_m, "M after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_m(input logic [23:0] exp, input string what);
    checks++;
    if (m !== exp) begin
      failures++;
      $display("FAIL %s: m=%h expected %h", what, m, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
