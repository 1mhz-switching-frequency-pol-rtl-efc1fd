`timescale 1ns/1ps
// tb_memory3: checks a = (K_I / A) n_I, rounded to nearest with halves away
// from zero, for every signed 9-bit n_I, at K_P = 5, K_I = 2, K_D = 1
// (A = 8), and checks that the published setting K_I = 0 gives a = 0.
module tb_memory3;
  localparam int unsigned N = 9;
  logic signed [N-1:0] ni;
  logic signed [N-1:0] a_i, a_0;
  int checks = 0, failures = 0;

  memory3 #(.N(N), .KP(5), .KI(2), .KD(1)) dut (.ni_prev(ni), .a(a_i));
  memory3 #(.N(N)) dut0 (.ni_prev(ni), .a(a_0));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -256; v < 256; v++) begin
      real x;
      int expv;
      ni = N'(v);
      #1;
      x = 2.0 * real'(v) / 8.0;
      expv = (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
      checks++;
      if (int'(a_i) != expv) begin
        failures++; $display("n_I %0d: a=%0d, expected %0d", v, a_i, expv);
      end
      checks++;
      if (a_0 != 0) begin
        failures++; $display("K_I=0, n_I %0d: a=%0d, expected 0", v, a_0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
