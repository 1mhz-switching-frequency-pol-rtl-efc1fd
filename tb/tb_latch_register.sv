`timescale 1ns/1ps
// tb_latch_register: the testbench keeps its own term counter, feeds a duty
// table stand-in (u_data = count XOR 0x0A5, so every clock offers a
// different word) and raises v_comp at a random count c of each term. It
// checks that:
//   * the latch pulse comes exactly once, on count c+2 (two synchronizer
//     stages), and u(k) takes the word offered then: the duty word changes
//     three clock edges, 6 ns at 500 MHz, after the comparator edge, within
//     the 11 ns reflection time measured on the prototype;
//   * a second comparator rise in the same term (chatter) is ignored;
//   * a term with no comparator rise keeps the preset and gives no latch;
//   * the preset pulse on the last count restores u(k) = 511;
//   * after a term without a trip, the comparator's high at the very start
//     of the next term falls in the blanking window and latches nothing.
module tb_latch_register;
  localparam int unsigned N = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic v_comp, pr, latch, v_comp_s;
  logic [N-1:0] u_data, u_k;
  int checks = 0, failures = 0;
  int cnt;

  latch_register #(.N(N)) dut (.clk, .rst_n, .y1(N'(cnt)), .v_comp, .u_data, .pr, .u_k, .latch, .v_comp_s);

  always #1 clk = ~clk;

  assign pr     = (cnt == 511);
  assign u_data = N'(cnt) ^ 9'h0A5;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int max_delay = 0;
    cnt = 0; v_comp = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    checks++;
    if (u_k != 9'd511) begin failures++; $display("reset value %0d", u_k); end
    for (int k = 0; k < 200; k++) begin
      int c, c2, latches, latch_cnt, rise_cnt;
      bit no_trip, prev_no_trip;
      prev_no_trip = (k % 10 == 0);
      no_trip = (k % 10 == 9);
      c  = int'($urandom_range(460, 20));
      c2 = c + int'($urandom_range(30, 8));
      latches = 0; latch_cnt = -1; rise_cnt = -1;
      for (cnt = 0; cnt < 512; cnt++) begin
        // Comparator: high at the start (left over from the last term),
        // low once the ramp restarts, high again from the crossing on, with
        // one short dip and second rise to imitate chatter.
        if (no_trip)                 v_comp = 1'b0;
        else if (cnt < 3)            v_comp = 1'b1;
        else if (cnt < c)            v_comp = 1'b0;
        else if (cnt >= c2 && cnt < c2 + 3) v_comp = 1'b0;
        else                         v_comp = 1'b1;
        if (!no_trip && cnt == c) rise_cnt = cnt;
        #0.5;
        if (latch) begin latches++; latch_cnt = cnt; end
        @(negedge clk);
        if (!no_trip && cnt == c + 2) begin
          checks++;
          if (u_k != (N'(c + 2) ^ 9'h0A5)) begin
            failures++; $display("k=%0d: u_k=%0d, expected word of count %0d", k, u_k, c + 2);
          end
        end
        if (cnt == 510) begin
          checks++;
          if (no_trip && u_k != 9'd511) begin failures++; $display("k=%0d: preset lost without trip", k); end
          else if (!no_trip && u_k != (N'(c + 2) ^ 9'h0A5)) begin
            failures++; $display("k=%0d: u_k changed after the first latch", k);
          end
        end
      end
      cnt = 0;
      #0.5;
      checks++;
      if (u_k != 9'd511) begin failures++; $display("k=%0d: no preset at term end", k); end
      checks++;
      if (no_trip ? (latches != 0) : (latches != 1 || latch_cnt != c + 2)) begin
        failures++; $display("k=%0d: %0d latches, last at %0d, trip at %0d", k, latches, latch_cnt, c);
      end
      if (!no_trip && latch_cnt - rise_cnt + 1 > max_delay) max_delay = latch_cnt - rise_cnt + 1;
    end
    // Comparator edge to new u(k): clock edges x 2 ns must be <= 11 ns.
    checks++;
    if (max_delay * 2 > 11) begin failures++; $display("reflection %0d ns", max_delay * 2); end
    $display("reflection delay %0d clocks (%0d ns)", max_delay, max_delay * 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
