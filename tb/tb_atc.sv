`timescale 1ns/1ps
// tb_atc: sets a DAC code and an output voltage and checks the comparator
// decision against V_ref = 1.6 V * code / 511 computed here, after the
// model's latency (DAC latch plus two clocks of comparator delay). It also
// sweeps the step-down ramp past a fixed E_o and checks that v_comp rises at
// the first code whose V_ref is below E_o.
module tb_atc;
  localparam int unsigned N = 9;
  logic clk = 1'b0;
  logic [N-1:0] dac_code;
  logic [31:0] eo_uv, vref_uv;
  logic v_comp;
  int checks = 0, failures = 0;

  atc #(.N(N), .VREF_MAX_UV(1_600_000), .CMP_DELAY(2)) dut (.clk, .dac_code, .eo_uv, .v_comp, .vref_uv);

  always #1 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dac_code = '0; eo_uv = '0;
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      int code;
      real vref, eo;
      code = int'($urandom_range(511));
      eo   = real'($urandom_range(1_700_000));
      vref = 1.6e6 * real'(code) / 511.0;
      dac_code = N'(code); eo_uv = 32'(int'(eo));
      repeat (3) @(negedge clk);
      checks++;
      if (v_comp != (eo > $floor(vref))) begin
        failures++; $display("code %0d eo %0.0f: v_comp=%0b vref=%0d", code, eo, v_comp, vref_uv);
      end
    end
    // Ramp sweep: E_o = 1.5 V; V_ref(code) < 1.5 V first at code 479.
    eo_uv = 32'd1_500_000;
    for (int c = 0; c < 512; c++) begin
      dac_code = N'(511 - c);
      @(negedge clk);
      // Three clock edges after a code is applied it shows at v_comp: the
      // one seen now was applied two loop steps ago.
      if (c >= 2) begin
        checks++;
        if (v_comp != (1.6e6 * real'(513 - c) / 511.0 < 1.5e6)) begin
          failures++; $display("ramp step %0d: v_comp=%0b", c, v_comp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
