`timescale 1ns/1ps
// tb_memory2: checks the duty table. With the default parameters
// (K_P = 5, K_I = K_D = 0, u_ref = 86, r = 40, limit 500) the entries must
// match the published example table: 0 up to address 22, then 1, 6, 11,
// 16 at 23..26, 481, 486, 491, 496 at 119..122 and 500 from 123 on. A
// second instance with all three gains non-zero is checked against the PID
// formula worked out here for every address.
module tb_memory2;
  localparam int unsigned N = 9;
  logic [N-1:0] addr;
  logic [N-1:0] u_def, u_pid;
  int checks = 0, failures = 0;

  memory2 #(.N(N)) dut (.addr, .u(u_def));
  memory2 #(.N(N), .KP(10), .KI(2), .KD(3), .U_REF(100), .R(30), .U_MIN(4), .U_MAX(480))
    dut_pid (.addr, .u(u_pid));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      int exp_def, exp_pid;
      addr = N'(i);
      #1;
      // Published example table.
      if (i <= 22)       exp_def = 0;
      else if (i >= 123) exp_def = 500;
      else               exp_def = 1 + 5 * (i - 23);
      checks++;
      if (int'(u_def) != exp_def) begin
        failures++; $display("default addr %0d: got %0d, expected %0d", i, u_def, exp_def);
      end
      // u = u_ref + K_P e + K_I n_I + K_D (e - e_prev) with n_I(k-1) and
      // y2(k-1) folded into the address: u_ref - (K_P+K_I) r + (K_P+K_I+K_D) addr.
      exp_pid = 100 - 12 * 30 + 15 * i;
      if (exp_pid < 4)   exp_pid = 4;
      if (exp_pid > 480) exp_pid = 480;
      checks++;
      if (int'(u_pid) != exp_pid) begin
        failures++; $display("pid addr %0d: got %0d, expected %0d", i, u_pid, exp_pid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
