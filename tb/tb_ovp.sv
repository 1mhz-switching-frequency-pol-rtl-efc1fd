`timescale 1ns/1ps
// tb_ovp: drives whole terms with PWM' high for the first u counts and a
// comparator level held per term. When the comparator is high at the sample
// count (16), Q must rise on the next clock, the output must go to ground
// from then on and Q must clear again by count 0 of the next term
// (selector: Q=0 passes PWM', Q=1 gives ground). When it is low, the PWM
// must pass unchanged for the whole term.
module tb_ovp;
  localparam int unsigned N = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] y1;
  logic v_comp_s, pwm_in, pwm, q;
  int checks = 0, failures = 0;

  ovp #(.N(N), .RESET_CNT(511), .SAMPLE_CNT(16)) dut (.clk, .rst_n, .y1, .v_comp_s, .pwm_in, .pwm, .q);

  always #1 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int protected_terms = 0;
    y1 = '0; v_comp_s = 1'b0; pwm_in = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int k = 0; k < 40; k++) begin
      bit over;
      int u, ontime;
      over = (k % 3 == 1);
      u = int'($urandom_range(400, 30));
      ontime = 0;
      for (int c = 0; c < 512; c++) begin
        bit q_exp;
        y1 = N'(c);
        // Comparator held high the whole term in an overvoltage term; in a
        // normal term it is low at the sample point and rises later.
        v_comp_s = over ? 1'b1 : (c > 200);
        pwm_in = (c < u);
        #0.5;
        // Q was set by the sample at count 16 and is cleared at the end of
        // count 511.
        q_exp = over && (c >= 17);
        checks++;
        if (q != q_exp) begin failures++; $display("k=%0d c=%0d: q=%0b", k, c, q); end
        checks++;
        if (pwm != (q_exp ? 1'b0 : pwm_in)) begin failures++; $display("k=%0d c=%0d: pwm=%0b", k, c, pwm); end
        ontime += int'(pwm);
        @(negedge clk);
      end
      checks++;
      if (over ? (ontime != 17) : (ontime != u)) begin
        failures++; $display("k=%0d: on-time %0d (u=%0d, over=%0b)", k, ontime, u, over);
      end
      if (over) protected_terms++;
    end
    checks++;
    if (protected_terms == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
