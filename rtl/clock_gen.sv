// clock_gen: the three clocks of the loop, Sc (fc), S1 (f1) and S2 (f2), as
// one-clock enable pulses.
//
// The loop only behaves as a frequency locked loop when f1 + f2 = fc; the
// ratio f2/fc sets the pole of the loop (lock speed against noise rejection).
// Sc ticks once every FC_DIV system clocks. A phase accumulator adds ratio_i
// on every Sc tick; a tick that makes the accumulator carry is passed on as an
// S1 tick, every other Sc tick as an S2 tick. S1 and S2 therefore split the Sc
// ticks between them, f1/fc = ratio_i / 2**RATIO_BITS on average and
// f1 + f2 = fc exactly, pulse for pulse. With ratio_i = 2**(RATIO_BITS-1)
// S1 and S2 alternate (f1 = f2 = fc/2, the realised configuration).
// The requirement f1 + f2 = fc and the runtime control of the ratio follow
// the loop's description; the accumulator and the divider are choices of
// this design.
//
// Timing: outputs are combinational from registers and ratio_i; ratio_i may
// change at any time and is used from the next Sc tick.
// With the default FC_DIV = 1, Sc ticks in every clock, so the Sc output
// is a constant 1; it is still brought out for FC_DIV > 1.
module clock_gen
  import fll_pkg::*;
#(
  parameter int unsigned RATIO_BITS = RATIO_BITS_DEFAULT,
  parameter int unsigned FC_DIV     = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [RATIO_BITS-1:0] ratio_i,
  output ticks_t                ticks_o
);

  localparam int unsigned DIV_W = (FC_DIV > 1) ? $clog2(FC_DIV) : 1;

  logic [DIV_W-1:0]      div_q;
  logic [RATIO_BITS-1:0] acc_q;
  logic [RATIO_BITS:0]   acc_sum;
  logic                  tick_c;

  always_comb begin
    if (FC_DIV > 1) tick_c = (div_q == DIV_W'(FC_DIV - 1));
    else            tick_c = 1'b1;
    acc_sum = {1'b0, acc_q} + {1'b0, ratio_i};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_q <= '0;
      acc_q <= '0;
    end else begin
      if (FC_DIV > 1) div_q <= tick_c ? '0 : div_q + 1'b1;
      if (tick_c) acc_q <= acc_sum[RATIO_BITS-1:0];
    end
  end

  assign ticks_o.c  = tick_c;
  assign ticks_o.f1 = tick_c &  acc_sum[RATIO_BITS];
  assign ticks_o.f2 = tick_c & ~acc_sum[RATIO_BITS];

endmodule
