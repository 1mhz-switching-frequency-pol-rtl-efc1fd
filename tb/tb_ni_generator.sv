`timescale 1ns/1ps
// tb_ni_generator: runs the integral accumulator through random sensing
// instants and checks that, after each latch pulse, n_I(k-1) equals the
// reference sum n_I + y1 - r (r = 40) kept by the testbench, limited to the
// signed 9-bit range, and that it holds between latch pulses. Long runs of
// large and small y1 drive it into both limits.
module tb_ni_generator;
  localparam int unsigned N = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] y1;
  logic latch;
  logic signed [N-1:0] ni_prev;
  int checks = 0, failures = 0;
  int hit_max = 0, hit_min = 0;

  ni_generator #(.N(N), .R(40)) dut (.clk, .rst_n, .y1, .latch, .ni_prev);

  always #1 clk = ~clk;

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model;
    y1 = '0; latch = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    model = 0;
    @(negedge clk);
    checks++;
    if (ni_prev != 0) begin failures++; $display("not zero after reset"); end
    for (int k = 0; k < 3000; k++) begin
      int v;
      // Phase: first a climb, then a fall, then random.
      if (k < 300)       v = int'($urandom_range(511, 200));
      else if (k < 800)  v = int'($urandom_range(30, 0));
      else               v = int'($urandom_range(120, 0));
      // A few clocks with no latch: the held value must not move.
      repeat (int'($urandom_range(3, 1))) begin
        y1 = N'($urandom_range(511));
        @(negedge clk);
        checks++;
        if (int'(ni_prev) != model) begin
          failures++; $display("k=%0d: value moved without latch: %0d vs %0d", k, ni_prev, model);
        end
      end
      y1 = N'(v); latch = 1'b1;
      @(negedge clk);
      latch = 1'b0;
      model = model + v - 40;
      if (model > 255)  begin model = 255;  hit_max++; end
      if (model < -256) begin model = -256; hit_min++; end
      checks++;
      if (int'(ni_prev) != model) begin
        failures++; $display("k=%0d y1=%0d: n_I=%0d, expected %0d", k, v, ni_prev, model);
      end
    end
    checks++;
    if (hit_max == 0 || hit_min == 0) begin failures++; $display("limits not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
