// edge_diff: falling-edge detector for a pulse rate, the synchronous
// counterpart of an RC differentiator.
//
// a_i may be asynchronous to clk. It passes through SYNC_STAGES flip-flops
// and one more register; fall_o is high for exactly one clock when the
// synchronised signal goes from 1 to 0. The loop uses the falling edges of
// Sin and Sop as its time marks; synchronising the input is a choice of this
// design.
//
// Timing: fall_o is high for the one clock that follows the SYNC_STAGES-th
// rising clock edge that samples a_i low. Pulses of a_i (high and low phases) must each last at least
// two clocks to be seen.
module edge_diff #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a_i,
  output logic fall_o
);

  if (SYNC_STAGES < 2) begin : g_bad_param
    $error("edge_diff: SYNC_STAGES must be at least 2");
  end

  logic [SYNC_STAGES-1:0] sync_q;
  logic                   last_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync_q <= '0;
      last_q <= 1'b0;
    end else begin
      sync_q <= {sync_q[SYNC_STAGES-2:0], a_i};
      last_q <= sync_q[SYNC_STAGES-1];
    end
  end

  assign fall_o = last_q & ~sync_q[SYNC_STAGES-1];

endmodule
