// interval_gen: the two interval flip-flops that turn the falling edges of
// Sin and Sop into the measured intervals d and T.
//
// d is set by the falling edge of Sin and cleared by the falling edge of Sop:
// it is high for the time difference d(k) between input and output. T is set
// by the falling edge of Sop and cleared by the falling edge of Sin: it is
// high for the rest T(k) of the input period, so TI(k) = d(k) + T(k) and
// TO(k) = T(k) + d(k+1). Exactly one of d and T is high at any time; the
// assertion below checks this.
//
// The set/clear roles follow the loop's description. Choices of this design:
// the flip-flops are clocked by clk and take one-clock edge pulses; when both
// edges fall in the same clock, the Sin edge is taken as the earlier one
// (d(k+1) = 0, a new T starts); reset leaves T set and d clear, as if an
// output period had just ended.
//
// Timing: d_o and t_o change one clock after the edge pulse.
module interval_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic sin_fall_i,
  input  logic sop_fall_i,
  output logic d_o,
  output logic t_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_o <= 1'b0;
      t_o <= 1'b1;
    end else begin
      if (sop_fall_i)      d_o <= 1'b0;
      else if (sin_fall_i) d_o <= 1'b1;
      if (sop_fall_i)      t_o <= 1'b1;
      else if (sin_fall_i) t_o <= 1'b0;
    end
  end

  a_one_interval : assert property (@(posedge clk) disable iff (!rst_n) d_o ^ t_o)
    else $error("interval_gen: d and T must be exclusive");

endmodule
