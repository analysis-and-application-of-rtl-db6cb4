// fll_top: first-order frequency locked loop that works on periods instead
// of phases.
//
// Once per output period the loop computes the next output period from the
// last input period TI(k) and the last output period TO(k):
//     fc*TO(k+1) = f1*TI(k) + f2*TO(k),    f1 + f2 = fc.
// The output period then settles on the input period with the pole f2/fc;
// the delay d between input and output settles too, but to a value that
// depends on where the loop started (a frequency lock, not a phase lock).
//
// Structure: edge_diff marks the falling edges of Sin; interval_gen turns
// the Sin and Sop edges into the intervals d and T; rcm counts them with the
// three clocks from clock_gen into the period word N_b; ppg turns N_b into
// the next output period and marks its end (Sop); ctrl_pulse_gen issues P1,
// P2 and R at each end of period; sign_gen tracks the sign of d. All of it
// runs on clk; Sc, S1 and S2 are clock enables.
//
// Interface: sin_i is the input pulse rate (asynchronous, high and low
// phases at least two clocks each). f1_ratio_i sets f1/fc =
// f1_ratio_i / 2**RATIO_BITS (2**(RATIO_BITS-1) gives f1 = f2 = fc/2, the
// realised configuration). sop_o is high for one clock at the end of every
// output period. nb_o is the word of the current output period, in Sc ticks.
// sign_o is the sign generator's state, ovf_o is sticky once a measuring
// counter has wrapped (input period too long for WIDTH bits). tick_*_o show
// the three clocks (tick_c_o is a constant 1 at the default FC_DIV = 1).
//
// Timing: all outputs are registered except the tick_*_o enables. The input
// edges reach the loop SYNC_STAGES clocks after they are first sampled; a
// constant delay that does not change the periods.
module fll_top
  import fll_pkg::*;
#(
  parameter int unsigned WIDTH       = WIDTH_DEFAULT,
  parameter int unsigned RATIO_BITS  = RATIO_BITS_DEFAULT,
  parameter int unsigned FC_DIV      = 1,
  parameter int unsigned INIT_PERIOD = 128,
  parameter int unsigned N_MIN       = 3,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sin_i,
  input  logic [RATIO_BITS-1:0] f1_ratio_i,
  output logic                  sop_o,
  output logic [WIDTH-1:0]      nb_o,
  output logic                  sign_o,
  output logic                  ovf_o,
  output logic                  tick_c_o,
  output logic                  tick_1_o,
  output logic                  tick_2_o
);

  ticks_t           ticks;
  ctrl_t            ctrl;
  logic             sin_fall, sop_fall;
  logic             d, t;
  logic [WIDTH-1:0] nb;
  logic             rcm_ovf;

  clock_gen #(.RATIO_BITS(RATIO_BITS), .FC_DIV(FC_DIV)) u_clock_gen (
    .clk    (clk),
    .rst_n  (rst_n),
    .ratio_i(f1_ratio_i),
    .ticks_o(ticks)
  );

  edge_diff #(.SYNC_STAGES(SYNC_STAGES)) u_sin_diff (
    .clk   (clk),
    .rst_n (rst_n),
    .a_i   (sin_i),
    .fall_o(sin_fall)
  );

  interval_gen u_interval_gen (
    .clk       (clk),
    .rst_n     (rst_n),
    .sin_fall_i(sin_fall),
    .sop_fall_i(sop_fall),
    .d_o       (d),
    .t_o       (t)
  );

  rcm #(.WIDTH(WIDTH)) u_rcm (
    .clk    (clk),
    .rst_n  (rst_n),
    .d_i    (d),
    .t_i    (t),
    .ticks_i(ticks),
    .p2_i   (ctrl.p2),
    .r_i    (ctrl.r),
    .nb_o   (nb),
    .ovf_o  (rcm_ovf)
  );

  ppg #(.WIDTH(WIDTH), .INIT_PERIOD(INIT_PERIOD), .N_MIN(N_MIN)) u_ppg (
    .clk     (clk),
    .rst_n   (rst_n),
    .tick_c_i(ticks.c),
    .p1_i    (ctrl.p1),
    .nb_i    (nb),
    .borrow_o(sop_fall),
    .period_o(nb_o)
  );

  ctrl_pulse_gen u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .sop_fall_i(sop_fall),
    .ctrl_o    (ctrl)
  );

  sign_gen u_sign_gen (
    .clk       (clk),
    .rst_n     (rst_n),
    .sin_fall_i(sin_fall),
    .sop_fall_i(sop_fall),
    .sign_o    (sign_o)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sop_o <= 1'b0;
      ovf_o <= 1'b0;
    end else begin
      sop_o <= sop_fall;
      if (rcm_ovf) ovf_o <= 1'b1;
    end
  end

  assign tick_c_o = ticks.c;
  assign tick_1_o = ticks.f1;
  assign tick_2_o = ticks.f2;

endmodule
