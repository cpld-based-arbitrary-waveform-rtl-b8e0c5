// tb_phase_register: self-checking test of the Phase Register.
//
// Drives random next-phase values, clock enables and resets and compares the register and
// its RAM address field (the top 15 bits) with a reference register kept by the test.
module tb_phase_register;
  logic clk = 1'b0, por_n = 1'b0, rst = 1'b0, ck_en = 1'b0;
  logic [23:0] d = '0, phase, ref_p;
  logic [14:0] addr;
  int checks = 0, failures = 0;

  phase_register dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    por_n = 1'b1;
    ref_p = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      d     = 24'($urandom);
      ck_en = ($urandom % 3) != 0;
      rst   = ($urandom % 16) == 0;
      @(posedge clk);
      if (rst) ref_p = '0;
      else if (ck_en) ref_p = d;
      #1;
      checks++;
      if (phase !== ref_p || addr !== ref_p[23:9]) begin
        failures++;
        $display("FAIL phase=%h addr=%h expected %h", phase, addr, ref_p);
      end
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
