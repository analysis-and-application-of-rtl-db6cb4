// ctrl_pulse_gen: the control pulses P1, P2 and R that follow the end of
// every output period, one after the other.
//
// P1 (preset the period generator with N_b) is issued in the clock that ends
// the output period, P2 (preset counter 2 with counter 1) one clock later and
// R (clear counter 1) one clock after P2. Each pulse is one clock wide. The
// order P1, P2, R follows the loop's description; one clock per pulse, with
// P1 in the same clock as the period end, is the choice of this design, so
// that the pulses take no time away from the measurement.
//
// Timing: p1 is combinational from sop_fall_i, i.e. the same signal under
// the name of its role; p2 and r are registered.
// The assertion checks that at most one pulse is high at a time, which holds
// as long as periods last at least three clocks.
module ctrl_pulse_gen
  import fll_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sop_fall_i,
  output ctrl_t ctrl_o
);

  logic p2_q, r_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p2_q <= 1'b0;
      r_q  <= 1'b0;
    end else begin
      p2_q <= sop_fall_i;
      r_q  <= p2_q;
    end
  end

  assign ctrl_o.p1 = sop_fall_i;
  assign ctrl_o.p2 = p2_q;
  assign ctrl_o.r  = r_q;

  a_one_pulse : assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0({ctrl_o.p1, ctrl_o.p2, ctrl_o.r}))
    else $error("ctrl_pulse_gen: overlapping control pulses");

endmodule
