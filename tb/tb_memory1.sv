`timescale 1ns/1ps
// tb_memory1: reads every entry of the reference-waveform table for the
// step-down sawtooth (the shape the controller uses) and for the two other
// shapes, and checks each against the shape's formula, including the one
// clock of read latency.
module tb_memory1;
  localparam int unsigned N = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] addr;
  logic [N-1:0] code_dn, code_up, code_tri;
  int checks = 0, failures = 0;

  memory1 #(.N(N)) dut (.clk, .rst_n, .addr, .dac_code(code_dn));
  memory1 #(.N(N), .WAVE(dpwm_pkg::WAVE_SAW_UP)) dut_up (.clk, .rst_n, .addr, .dac_code(code_up));
  memory1 #(.N(N), .WAVE(dpwm_pkg::WAVE_TRIANGLE)) dut_tri (.clk, .rst_n, .addr, .dac_code(code_tri));

  always #1 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 512; i++) begin
      int tri_exp;
      @(negedge clk) addr = N'(i);
      @(negedge clk);
      tri_exp = (i < 256) ? 2 * i : 2 * (511 - i);
      checks++;
      if (int'(code_dn) != 511 - i) begin
        failures++; $display("saw-down addr %0d: got %0d, expected %0d", i, code_dn, 511 - i);
      end
      checks++;
      if (int'(code_up) != i) begin
        failures++; $display("saw-up addr %0d: got %0d", i, code_up);
      end
      checks++;
      if (int'(code_tri) != tri_exp) begin
        failures++; $display("triangle addr %0d: got %0d, expected %0d", i, code_tri, tri_exp);
      end
    end
    // Latency: a new address shows on the output only after one clock edge.
    @(negedge clk) addr = 9'd100;
    @(negedge clk) addr = 9'd200;
    #0.5;
    checks++;
    if (code_dn != 9'd411) begin failures++; $display("latency check failed: %0d", code_dn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
