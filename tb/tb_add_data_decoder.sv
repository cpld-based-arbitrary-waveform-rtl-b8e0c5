// tb_add_data_decoder: self-checking test of the host-bus decoder.
//
// Plays host write cycles (address and data) with random bytes and checks, against values
// the test keeps itself: the one-hot select y for every 3-bit address, the reset line from
// address bit 3, one data_wr pulse per data write exactly 3 clk edges after IOW rises, the
// captured byte, and no data_wr for address writes.
module tb_add_data_decoder;
  import awg_pkg::*;

  logic clk = 1'b0, por_n = 1'b0;
  logic [7:0] pp_data = '0;
  logic pp_add = 1'b0, pp_iow = 1'b0;
  logic [7:0] y;
  logic rst, data_wr;
  logic [7:0] wdata;
  int checks = 0, failures = 0;
  int cyc = 0;
  int wr_pulses = 0;

  add_data_decoder dut (.*);

  always #50 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (data_wr) wr_pulses++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // One host write; returns the number of clk edges from IOW rise to data_wr seen high
  task automatic host_write(input bit add, input logic [7:0] b, output int lat);
    int n;
    pp_add  = add;
    pp_data = b;
    repeat (3) @(negedge clk);
    pp_iow = 1'b1;
    n = 0;
    lat = -1;
    repeat (6) begin
      @(posedge clk);
      n++;
      #1;
      if (data_wr && lat < 0) lat = n;
    end
    pp_iow = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int lat, n_before;
    logic [3:0] addr;
    logic [7:0] b;
    repeat (3) @(negedge clk);
    por_n = 1'b1;
    repeat (2) @(negedge clk);
    check(y == 8'h01 && !rst && !data_wr, "power-on state: Y0, no reset");
    for (int i = 0; i < 200; i++) begin
      addr = 4'($urandom);
      n_before = wr_pulses;
      host_write(1'b1, {4'($urandom), addr}, lat);
      check(wr_pulses == n_before, "address write gives no data strobe");
      check(y == (8'h01 << addr[2:0]), $sformatf("select for address %0d", addr));
      check(rst == addr[3], "reset follows address bit 3");
      b = 8'($urandom);
      n_before = wr_pulses;
      host_write(1'b0, b, lat);
      check(wr_pulses == n_before + 1, "one data strobe per data write");
      check(lat == 3, $sformatf("data strobe 3 edges after IOW rise (got %0d)", lat));
      check(wdata == b, "captured byte");
      check(y == (8'h01 << addr[2:0]), "data write keeps the select");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
