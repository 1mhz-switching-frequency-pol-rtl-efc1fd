`timescale 1ns/1ps
// tb_digital_comparator: runs the counter through whole terms with a random
// duty word held per term and checks the registered PWM' against
// y1 < u(k) of the previous clock; each term's on-time must equal u(k).
module tb_digital_comparator;
  localparam int unsigned N = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] y1, u_k;
  logic pwm_raw;
  int checks = 0, failures = 0;

  digital_comparator #(.N(N)) dut (.clk, .rst_n, .y1, .u_k, .pwm_raw);

  always #1 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    y1 = '0; u_k = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int k = 0; k < 60; k++) begin
      int u, ontime;
      u = (k == 0) ? 0 : (k == 1) ? 511 : int'($urandom_range(511));
      u_k = N'(u);
      ontime = 0;
      for (int c = 0; c < 512; c++) begin
        bit expv;
        y1 = N'(c);
        expv = (c < u);
        @(negedge clk);
        checks++;
        if (pwm_raw != expv) begin failures++; $display("u=%0d y1=%0d: pwm=%0b", u, c, pwm_raw); end
        ontime += int'(pwm_raw);
      end
      checks++;
      if (ontime != u) begin failures++; $display("u=%0d: on-time %0d", u, ontime); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
