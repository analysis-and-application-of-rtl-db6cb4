// rcm: Recursive Calculation Module. Measures the intervals d and T with the
// three clocks and sums them into the next period word N_b.
//
// The loop equation fc*TO(k+1) = f1*TI(k) + f2*TO(k) is evaluated, with
// f1 + f2 = fc, in the equivalent form
//     fc*TO(k+1) = f1*d(k) + fc*T(k) + f2*d(k+1)
// which needs only one continuous measurement of three adjacent intervals:
//   counter 1 counts S1 ticks while d is high, giving f1*d(k);
//   at the end of the output period, P2 presets counter 2 with counter 1 and
//   R then clears counter 1 for the next d;
//   counter 2 goes on counting Sc ticks while T is high and S2 ticks while d
//   is high, so at the end of the next output period it holds N_b.
// Every d is thus measured twice at once, by S1 in counter 1 and by S2 in
// counter 2. This structure follows the loop's description.
//
// nb_o is counter 2 plus the tick it takes in the current clock, i.e. the
// value counter 2 holds once this clock has passed: the period generator
// loads it (P1) in the clock that ends the output period, so the tick of that
// clock is counted too. ovf_o flags a counter wrapping past all ones; the
// counters wrap like the counters they model, and the loop then runs with
// a wrong period word until the next one.
//
// Timing: P1 comes in the clock that ends an output period, P2 in the next
// clock and R in the one after; d is low in the P2 clock, so counter 1 does
// not move between the P2 transfer and the R clear. Choices of this design:
// the tick-exact handling of preset and clear (see ud_counter) and the
// overflow flag.
module rcm
  import fll_pkg::*;
#(
  parameter int unsigned WIDTH = WIDTH_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             d_i,
  input  logic             t_i,
  input  ticks_t           ticks_i,
  input  logic             p2_i,
  input  logic             r_i,
  output logic [WIDTH-1:0] nb_o,
  output logic             ovf_o
);

  logic             up1, up2;
  logic [WIDTH-1:0] q1, q2;
  logic             carry1, carry2;
  logic             unused_borrow1, unused_borrow2;

  // Counter 1: S1 gated by d.
  assign up1 = d_i & ticks_i.f1;
  // Counter 2: S2 gated by d, or Sc gated by T.
  assign up2 = (d_i & ticks_i.f2) | (t_i & ticks_i.c);

  ud_counter #(.WIDTH(WIDTH)) u_counter1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .up_i    (up1),
    .dn_i    (1'b0),
    .load_i  (1'b0),
    .clr_i   (r_i),
    .d_i     ('0),
    .q_o     (q1),
    .carry_o (carry1),
    .borrow_o(unused_borrow1)
  );

  ud_counter #(.WIDTH(WIDTH)) u_counter2 (
    .clk     (clk),
    .rst_n   (rst_n),
    .up_i    (up2),
    .dn_i    (1'b0),
    .load_i  (p2_i),
    .clr_i   (1'b0),
    .d_i     (q1),
    .q_o     (q2),
    .carry_o (carry2),
    .borrow_o(unused_borrow2)
  );

  assign nb_o  = q2 + WIDTH'(up2);
  assign ovf_o = carry1 | carry2;

endmodule
