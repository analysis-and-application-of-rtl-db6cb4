// ppg: Programmable Period Generator. Produces one output event every N_b
// periods of the clock Sc.
//
// A down counter is decremented by every Sc tick. The Sc tick at which it
// would pass below zero is the end of the output period (borrow_o, the
// output pulse Sop); in that same clock the control pulse P1 presets the
// counter with the new period word, and since the preset keeps the tick of
// that clock (see ud_counter) the counter restarts at N_b - 1 and the next
// borrow comes exactly N_b Sc ticks later. TO = N_b * tc, as described for
// the loop.
//
// Choices of this design: words below N_MIN are raised to N_MIN so that the
// control pulses P2 and R, which follow P1 by one and two clocks, always
// finish inside the period; after reset the counter holds INIT_PERIOD - 1,
// so the first period is INIT_PERIOD ticks long (the initial value TO(0)).
// period_o holds the word that defines the current period.
//
// Timing: borrow_o is combinational from the counter and the Sc tick; p1_i
// must be high in that clock for the period to be reloaded.
module ppg
  import fll_pkg::*;
#(
  parameter int unsigned WIDTH       = WIDTH_DEFAULT,
  parameter int unsigned INIT_PERIOD = 128,
  parameter int unsigned N_MIN       = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick_c_i,
  input  logic             p1_i,
  input  logic [WIDTH-1:0] nb_i,
  output logic             borrow_o,
  output logic [WIDTH-1:0] period_o
);

  if (INIT_PERIOD < N_MIN || INIT_PERIOD >= 2**WIDTH || N_MIN < 1) begin : g_bad_param
    $error("ppg: need N_MIN <= INIT_PERIOD < 2**WIDTH and N_MIN >= 1");
  end

  logic [WIDTH-1:0] n_eff;
  logic [WIDTH-1:0] unused_count;
  logic             unused_carry;

  assign n_eff = (nb_i < WIDTH'(N_MIN)) ? WIDTH'(N_MIN) : nb_i;

  ud_counter #(.WIDTH(WIDTH), .RST_VAL(WIDTH'(INIT_PERIOD - 1))) u_down (
    .clk     (clk),
    .rst_n   (rst_n),
    .up_i    (1'b0),
    .dn_i    (tick_c_i),
    .load_i  (p1_i),
    .clr_i   (1'b0),
    .d_i     (n_eff),
    .q_o     (unused_count),
    .carry_o (unused_carry),
    .borrow_o(borrow_o)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)    period_o <= WIDTH'(INIT_PERIOD);
    else if (p1_i) period_o <= n_eff;
  end

  a_p1_on_borrow : assert property (@(posedge clk) disable iff (!rst_n) p1_i |-> borrow_o)
    else $error("ppg: P1 outside the end of a period");

endmodule
