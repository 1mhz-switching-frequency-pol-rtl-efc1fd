`timescale 1ns/1ps
// tb_y2_register: issues one latch pulse per simulated term with a random
// counter value and checks that y2 takes the value at once, that y2_prev
// still shows the previous term's value on the latch clock, and that y2_prev
// takes the new value one clock later and holds it until the next term.
module tb_y2_register;
  localparam int unsigned N = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] y1, y2, y2_prev;
  logic latch;
  int checks = 0, failures = 0;

  y2_register #(.N(N)) dut (.clk, .rst_n, .y1, .latch, .y2, .y2_prev);

  always #1 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_val, cur_val;
    y1 = '0; latch = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    prev_val = 0; cur_val = 0;
    @(negedge clk);
    for (int k = 0; k < 500; k++) begin
      int v;
      v = int'($urandom_range(511));
      y1 = N'(v); latch = 1'b1;
      // Just before the latch edge, y2_prev must show the previous sample.
      checks++;
      if (int'(y2_prev) != prev_val) begin
        failures++; $display("k=%0d: y2_prev=%0d before latch, expected %0d", k, y2_prev, prev_val);
      end
      @(negedge clk);
      latch = 1'b0;
      y1 = N'($urandom_range(511));
      checks++;
      if (int'(y2) != v) begin failures++; $display("k=%0d: y2=%0d, expected %0d", k, y2, v); end
      checks++;
      if (int'(y2_prev) != prev_val) begin
        failures++; $display("k=%0d: y2_prev changed on the latch clock", k);
      end
      cur_val = v;
      repeat (int'($urandom_range(6, 2))) begin
        @(negedge clk);
        y1 = N'($urandom_range(511));
        checks++;
        if (int'(y2_prev) != cur_val || int'(y2) != cur_val) begin
          failures++; $display("k=%0d: y2_prev=%0d y2=%0d, expected %0d", k, y2_prev, y2, cur_val);
        end
      end
      prev_val = cur_val;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
