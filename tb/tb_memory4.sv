`timescale 1ns/1ps
// tb_memory4: checks b = (K_D / A) y2, rounded to nearest with halves up,
// for every 9-bit y2, at K_P = 4, K_I = 1, K_D = 3 (A = 8), and checks that
// the published setting K_D = 0 gives b = 0.
module tb_memory4;
  localparam int unsigned N = 9;
  logic [N-1:0] y2;
  logic [N-1:0] b_d, b_0;
  int checks = 0, failures = 0;

  memory4 #(.N(N), .KP(4), .KI(1), .KD(3)) dut (.y2_prev(y2), .b(b_d));
  memory4 #(.N(N)) dut0 (.y2_prev(y2), .b(b_0));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int expv;
      y2 = N'(v);
      #1;
      expv = int'($floor(3.0 * real'(v) / 8.0 + 0.5));
      checks++;
      if (int'(b_d) != expv) begin
        failures++; $display("y2 %0d: b=%0d, expected %0d", v, b_d, expv);
      end
      checks++;
      if (b_0 != 0) begin
        failures++; $display("K_D=0, y2 %0d: b=%0d", v, b_0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
