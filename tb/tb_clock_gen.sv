// tb_clock_gen: self-checking test of the clock-enable generator.
//
// Two instances run side by side: Sc on every clock (FC_DIV = 1) and Sc on
// every third clock (FC_DIV = 3). For several ratios the test counts the
// enables over whole accumulator cycles (2**RATIO_BITS Sc ticks) and checks:
// S1 and S2 never tick together, each S1 or S2 tick is an Sc tick, the number
// of S1 ticks in one accumulator cycle equals the ratio exactly, and Sc ticks
// once every FC_DIV clocks.
module tb_clock_gen;
  import fll_pkg::*;

  localparam int unsigned RB = 8;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [RB-1:0] ratio;
  ticks_t        tk_a, tk_b;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_gen #(.RATIO_BITS(RB), .FC_DIV(1)) dut_a (.clk, .rst_n, .ratio_i(ratio), .ticks_o(tk_a));
  clock_gen #(.RATIO_BITS(RB), .FC_DIV(3)) dut_b (.clk, .rst_n, .ratio_i(ratio), .ticks_o(tk_b));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ratios[6] = '{128, 1, 13, 51, 205, 243};

  initial begin
    int n1a, n2a, nca, n1b, nb, ncb, cyc;
    rst_n = 1'b0;
    ratio = '0;
    foreach (ratios[i]) begin
      ratio = RB'(ratios[i]);
      rst_n = 1'b0;
      @(posedge clk);
      @(negedge clk) rst_n = 1'b1;
      n1a = 0; n2a = 0; nca = 0; n1b = 0; nb = 0; ncb = 0; cyc = 0;
      // the divider starts at 0 after reset, so the first slow Sc tick is the
      // third clock and tick 256 is clock 3*256-1
      while (ncb < (1 << RB)) begin
        @(negedge clk);
        cyc++;
        check(!(tk_a.f1 && tk_a.f2) && !(tk_b.f1 && tk_b.f2), "S1 and S2 overlap");
        check((tk_a.f1 | tk_a.f2) == tk_a.c && (tk_b.f1 | tk_b.f2) == tk_b.c,
              "S1/S2 not a split of Sc");
        if (tk_a.c) nca++;
        if (tk_a.f1) n1a++;
        if (tk_a.f2) n2a++;
        if (tk_b.c) ncb++;
        if (tk_b.f1) n1b++;
        if (tk_b.f2) nb++;
        if (nca == (1 << RB) && tk_a.c) begin
          check(n1a == int'(ratios[i]), $sformatf("f1 count %0d != ratio %0d", n1a, ratios[i]));
          check(n1a + n2a == nca, "f1 + f2 != fc");
        end
      end
      check(cyc == 3 * (1 << RB) - 1, $sformatf("FC_DIV=3: %0d clocks for 256 Sc ticks", cyc));
      check(n1b == int'(ratios[i]), $sformatf("FC_DIV=3: f1 count %0d != ratio %0d", n1b, ratios[i]));
      check(n1b + nb == ncb, "FC_DIV=3: f1 + f2 != fc");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
