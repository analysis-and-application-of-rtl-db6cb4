// ud_counter: WIDTH-bit binary up/down counter with parallel preset, clear
// and wrap flags, the synchronous counterpart of a cascade of 4-bit up/down
// counters.
//
// Each clock the counter starts from a base value: 0 if clr_i, d_i if load_i,
// else its content. It then counts one up if only up_i is high, one down if
// only dn_i is high. A preset or clear in the same clock as a count therefore
// keeps that count, so no clock tick of the loop is lost while the control
// pulses act. carry_o flags an up count at the all-ones content and borrow_o a
// down count at zero (both look at the content before any preset or clear);
// the counter wraps in both cases.
//
// Counting up and down, presetting and clearing follow the described
// counters (eight bits, two 4-bit stages); keeping the count of a tick that
// coincides with a preset, and the priority of clear over preset, are
// choices of this design.
//
// Timing: q_o is registered; carry_o and borrow_o are combinational.
module ud_counter #(
  parameter int unsigned         WIDTH   = 8,
  parameter logic [WIDTH-1:0]    RST_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             up_i,
  input  logic             dn_i,
  input  logic             load_i,
  input  logic             clr_i,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o,
  output logic             carry_o,
  output logic             borrow_o
);

  logic [WIDTH-1:0] base, nxt;

  always_comb begin
    if (clr_i)       base = '0;
    else if (load_i) base = d_i;
    else             base = q_o;
    if (up_i && !dn_i)      nxt = base + 1'b1;
    else if (dn_i && !up_i) nxt = base - 1'b1;
    else                    nxt = base;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) q_o <= RST_VAL;
    else        q_o <= nxt;
  end

  assign carry_o  = up_i & ~dn_i & (q_o == '1);
  assign borrow_o = dn_i & ~up_i & (q_o == '0);

endmodule
