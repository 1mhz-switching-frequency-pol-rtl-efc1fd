`timescale 1ns/1ps
// tb_pr_generator: the preset pulse must be high for the last count of the
// term (511) and low for every other count.
module tb_pr_generator;
  localparam int unsigned N = 9;
  logic [N-1:0] y1;
  logic pr;
  int checks = 0, failures = 0;

  pr_generator #(.N(N)) dut (.y1, .pr);

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      y1 = N'(i);
      #1;
      checks++;
      if (pr != (i == 511)) begin failures++; $display("y1=%0d: pr=%0b", i, pr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
