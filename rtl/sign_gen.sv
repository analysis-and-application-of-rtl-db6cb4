// sign_gen: two-state sign generator for the time difference d.
//
// d is measured from a falling edge of Sin to the next falling edge of Sop,
// so it cannot show its sign by itself. The generator watches the order of
// the edges: two or more Sin edges without a Sop edge in between (the input
// runs ahead, d positive and growing) set the state to 0; two or more Sop
// edges without a Sin edge in between (the output runs ahead, d negative)
// set it to 1. Otherwise the state is held. The two states and their
// meaning follow the loop's description; the edge counters and the encoding
// are choices of this design. The loop itself locks without this flag; it
// is brought out for a controller that wants to follow each step.
//
// Timing: sign_o is registered and changes one clock after the second edge.
// Coincident edges count as Sin first, then Sop. Reset gives 0.
module sign_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic sin_fall_i,
  input  logic sop_fall_i,
  output logic sign_o
);

  logic sin_seen_q;  // a Sin edge since the last Sop edge
  logic sop_seen_q;  // a Sop edge since the last Sin edge

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sin_seen_q <= 1'b0;
      sop_seen_q <= 1'b0;
      sign_o     <= 1'b0;
    end else if (sin_fall_i && sop_fall_i) begin
      if (sin_seen_q) sign_o <= 1'b0;
      sin_seen_q <= 1'b0;
      sop_seen_q <= 1'b1;
    end else if (sin_fall_i) begin
      if (sin_seen_q) sign_o <= 1'b0;
      sin_seen_q <= 1'b1;
      sop_seen_q <= 1'b0;
    end else if (sop_fall_i) begin
      if (sop_seen_q) sign_o <= 1'b1;
      sop_seen_q <= 1'b1;
      sin_seen_q <= 1'b0;
    end
  end

endmodule
