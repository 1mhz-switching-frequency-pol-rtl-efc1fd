`timescale 1ns/1ps
// tb_address_adder: address' = y1 + a - b, limited to 0..511, checked on
// the corner cases and on random operands.
module tb_address_adder;
  localparam int unsigned N = 9;
  logic [N-1:0] y1, b, addr;
  logic signed [N-1:0] a;
  int checks = 0, failures = 0;

  address_adder #(.N(N)) dut (.y1, .a, .b, .addr);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_one(input int vy, input int va, input int vb);
    int expv;
    y1 = N'(vy); a = N'(va); b = N'(vb);
    #1;
    expv = vy + va - vb;
    if (expv < 0) expv = 0;
    if (expv > 511) expv = 511;
    checks++;
    if (int'(addr) != expv) begin
      failures++; $display("y1=%0d a=%0d b=%0d: addr=%0d, expected %0d", vy, va, vb, addr, expv);
    end
  endtask

  initial begin
    try_one(0, 0, 0);
    try_one(37, 0, 0);
    try_one(511, 0, 0);
    try_one(511, 255, 0);
    try_one(0, -256, 511);
    try_one(10, -5, 3);
    try_one(100, 20, 50);
    for (int i = 0; i < 4000; i++)
      try_one(int'($urandom_range(511)), int'($urandom_range(511)) - 256, int'($urandom_range(511)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
