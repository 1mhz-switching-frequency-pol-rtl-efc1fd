`timescale 1ns/1ps
// address_adder: forms the duty-table address, address' = y1(k) + a - b.
//
// a - b is the initial value that the integral and derivative tables
// prepare during the previous term; adding the running counter y1 makes
// address' advance one step per clock, so the duty table is read for every
// possible sensing instant and the right entry is ready the moment the
// comparator trips. The sum is formed with two guard bits and limited to
// 0 .. 2**N-1 so that it always indexes the table (the limiting is this
// design's choice). Combinational.
module address_adder #(
  parameter int unsigned N = dpwm_pkg::N_BITS
) (
  input  logic [N-1:0]        y1,
  input  logic signed [N-1:0] a,
  input  logic [N-1:0]        b,
  output logic [N-1:0]        addr
);

  localparam int MAXA = 2 ** N - 1;

  logic signed [N+2:0] sum;

  always_comb begin
    sum = (N+3)'($signed({1'b0, y1})) + (N+3)'(a) - (N+3)'($signed({1'b0, b}));
    if (sum < 0)                    addr = '0;
    else if (sum > (N+3)'(MAXA))    addr = N'(MAXA);
    else                            addr = sum[N-1:0];
  end

endmodule
