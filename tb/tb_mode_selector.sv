// tb_mode_selector: self-checking test of the mode selector.
//
// Power-on Programming mode; sample writes alternate low lane / high lane and advance the
// phase only on the high-lane write; RST puts the lane back to low; writes to other registers
// do nothing to the RAM; the mode bit written through Y4 switches to Generation mode, where
// the phase advances every cycle, both lanes are selected, writes are blocked and the RAM
// output is enabled; and back to Programming mode.
module tb_mode_selector;
  logic clk = 1'b0, por_n = 1'b0, rst = 1'b0;
  logic sel_mode = 1'b0, sel_ram = 1'b0, data_wr = 1'b0, bit0 = 1'b0;
  logic ctl0, ck_en, ram_wr_n, ram_oe_n, buf_en;
  logic [1:0] ram_cs;
  int checks = 0, failures = 0;

  mode_selector dut (.*);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t ctl0=%b ck_en=%b wr_n=%b cs=%b oe_n=%b buf_en=%b)",
               what, $time, ctl0, ck_en, ram_wr_n, ram_cs, ram_oe_n, buf_en);
    end
  endtask

  // one-cycle write strobe with the given selects, checked in the strobe cycle
  task automatic strobe(input bit m, input bit r, input bit b);
    @(negedge clk);
    sel_mode = m; sel_ram = r; bit0 = b; data_wr = 1'b1;
    #1;
  endtask

  task automatic idle();
    @(negedge clk);
    data_wr = 1'b0;
    #1;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    por_n = 1'b1;
    #1;
    check(ctl0 == 1'b1 && ram_oe_n == 1'b1, "power-on Programming mode, RAM output off");
    check(!ck_en && ram_wr_n, "idle: no advance, no write");
    for (int s = 0; s < 20; s++) begin
      strobe(1'b0, 1'b1, 1'b0);
      check(!ram_wr_n && ram_cs == 2'b01 && !ck_en && buf_en, "first byte: low lane, no advance");
      idle();
      check(ram_wr_n && !ck_en, "between writes");
      strobe(1'b0, 1'b1, 1'b0);
      check(!ram_wr_n && ram_cs == 2'b10 && ck_en, "second byte: high lane and advance");
      idle();
    end
    // a write to another register touches nothing
    sel_ram = 1'b0;
    strobe(1'b0, 1'b0, 1'b1);
    check(ram_wr_n && !ck_en && !buf_en && ctl0, "write to another register");
    idle();
    // RST after a lone low byte puts the lane back
    strobe(1'b0, 1'b1, 1'b0);
    idle();
    rst = 1'b1;
    idle();
    rst = 1'b0;
    strobe(1'b0, 1'b1, 1'b0);
    check(ram_cs == 2'b01 && !ck_en, "after RST the next byte is the low lane");
    idle();
    // Y4 write of 0 -> Generation mode
    strobe(1'b1, 1'b0, 1'b0);
    idle();
    check(ctl0 == 1'b0 && ram_oe_n == 1'b0 && ram_cs == 2'b11, "Generation mode outputs");
    for (int i = 0; i < 10; i++) begin
      check(ck_en && ram_wr_n, "Generation: advance every cycle, no write");
      idle();
    end
    strobe(1'b0, 1'b1, 1'b0);
    check(ram_wr_n && !buf_en, "Generation: RAM data writes blocked");
    idle();
    // back to Programming mode
    strobe(1'b1, 1'b0, 1'b1);
    idle();
    check(ctl0 == 1'b1 && ram_oe_n && !ck_en, "back to Programming mode");
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
