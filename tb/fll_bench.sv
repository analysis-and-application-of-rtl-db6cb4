// fll_bench: one loop with its input generator and its monitor, for the
// workload test.
//
// The input Sin is a train of two-clock pulses. Its first falling edge
// reaches the loop at clock START after reset (the edge is driven
// SYNC = 2 clocks earlier, to cover the input synchroniser). The length of
// each following input period is chosen when the period starts:
//   MODE 0  constant TI0 clocks (step input);
//   MODE 1  TI0 plus a uniform random offset in [-NOISE, NOISE];
//   MODE 2  TI0 + SLOPE*k for the k-th period (ramp).
// The lengths are kept in ti_hist. The loop runs with the ratio
// f1/fc = RATIO/256 and starts with an output period of INIT clocks, so the
// first end of period t(0) is clock INIT - 1: with START = INIT - 1 - d(0)
// the run starts from d(0), and the word loaded at t(0) is TO(0).
module fll_bench #(
  parameter int INIT  = 128,
  parameter int RATIO = 128,
  parameter int START = 100,
  parameter int MODE  = 0,
  parameter int TI0   = 100,
  parameter int NOISE = 0,
  parameter int SLOPE = 0
) (
  input logic clk,
  input logic rst_n
);
  logic       sin, sop, sign, ovf, tc, t1, t2;
  logic [7:0] nb;
  int         ti_hist[$];

  fll_top #(.INIT_PERIOD(INIT)) dut (
    .clk, .rst_n, .sin_i(sin), .f1_ratio_i(8'(RATIO)), .sop_o(sop), .nb_o(nb), .sign_o(sign),
    .ovf_o(ovf), .tick_c_o(tc), .tick_1_o(t1), .tick_2_o(t2));

  fll_monitor #(.W(8), .NMIN(3), .INIT(INIT), .SYNC(2)) mon (
    .clk, .rst_n, .sin_i(sin), .sop_o(sop), .nb_o(nb), .tick_c(tc), .tick_1(t1), .tick_2(t2));

  function automatic int next_period(input int k);
    case (MODE)
      1:       return TI0 - NOISE + int'($urandom_range(2 * NOISE));
      2:       return TI0 + SLOPE * k;
      default: return TI0;
    endcase
  endfunction

  // drive: clock n of the loop (n = 0 is the first clock after reset) sees
  // the edge driven in clock n - 2
  int n = 0, next_fall, k = 0;
  initial begin
    sin = 1'b0;
    next_fall = START - 2;
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      #1;
      n++;
      if (n == next_fall - 2) sin = 1'b1;
      if (n == next_fall) begin
        sin = 1'b0;
        ti_hist.push_back(next_period(k));
        next_fall += ti_hist[k];
        k++;
      end
    end
  end
endmodule
