// tb_data_buffer: self-checking test of the RAM data bus driver.
//
// Every byte value with the buffer enabled and disabled: enabled, D0..D7 carry the byte and
// D8..D11 its low nibble; disabled, the bus is 0.
module tb_data_buffer;
  logic en;
  logic [7:0] din;
  logic [11:0] dbus;
  int checks = 0, failures = 0;

  data_buffer dut (.*);

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 256; v++) begin
        logic [11:0] exp;
        en  = e[0];
        din = 8'(v);
        #1;
        exp = e[0] ? {din[3:0], din} : 12'h000;
        checks++;
        if (dbus !== exp) begin
          failures++;
          $display("FAIL en=%b din=%h dbus=%h expected %h", en, din, dbus, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
