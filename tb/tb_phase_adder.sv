// tb_phase_adder: self-checking test of the 24-bit phase adder.
//
// Random and corner operands; the expected sum and carry come from 64-bit integer arithmetic.
module tb_phase_adder;
  logic [23:0] a, b, s;
  logic co;
  int checks = 0, failures = 0;

  phase_adder dut (.*);

  task automatic try(input logic [23:0] x, input logic [23:0] z);
    longint unsigned full;
    a = x;
    b = z;
    #1;
    full = longint'(x) + longint'(z);
    checks++;
    if (s !== full[23:0] || co !== full[24]) begin
      failures++;
      $display("FAIL %h + %h = %h co %b", x, z, s, co);
    end
  endtask

  initial begin
    try(24'h0, 24'h0);
    try(24'hFFFFFF, 24'h1);
    try(24'hFFFFFF, 24'hFFFFFF);
    try(24'h00FFFF, 24'h000001);  // carry across the 16-bit boundary
    try(24'h000200, 24'h7FFE00);
    for (int i = 0; i < 5000; i++) try(24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
