`timescale 1ns/1ps
// tb_up_counter: checks the term counter against a cycle count kept by the
// testbench: y1 must equal the number of clocks since reset modulo 2**N,
// and the counter must reach its last count (511) once every
// 2**N clocks (512 at the default 9 bits).
module tb_up_counter;
  localparam int unsigned N = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] y1;
  int checks = 0, failures = 0;

  up_counter #(.N(N)) dut (.clk, .rst_n, .y1);
  logic term_end;
  assign term_end = (y1 == 9'd511);

  always #1 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    int last_wrap, wraps;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    expected = 0;
    last_wrap = -1; wraps = 0;
    @(negedge clk);
    for (int t = 0; t < 3 * 512 + 7; t++) begin
      checks++;
      if (int'(y1) != expected % 512) begin
        failures++;
        $display("cycle %0d: y1=%0d term_end=%0b, expected %0d", t, y1, term_end, expected % 512);
      end
      if (term_end) begin
        if (last_wrap >= 0) begin
          checks++;
          if (t - last_wrap != 512) begin
            failures++;
            $display("term length %0d, expected 512", t - last_wrap);
          end
        end
        last_wrap = t;
        wraps++;
      end
      expected++;
      @(negedge clk);
    end
    checks++;
    if (wraps != 3) begin failures++; $display("saw %0d term ends, expected 3", wraps); end
    // Synchronous reset returns the counter to zero.
    rst_n <= 1'b0;
    @(negedge clk);
    checks++;
    if (y1 != 0) begin failures++; $display("reset did not clear y1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
