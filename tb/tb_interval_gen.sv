// tb_interval_gen: self-checking test of the d/T interval flip-flops.
//
// Random one-clock Sin and Sop edge pulses (sometimes together) drive the
// block. The expected state is kept as the kind of the last edge seen: after
// a lone Sin edge d is high, after a Sop edge (alone or with a Sin edge) T
// is high. The test also measures the d and T intervals it expects and
// compares their lengths with the time the outputs stay high.
module tb_interval_gen;
  logic clk = 1'b0, rst_n, sin_f, sop_f, d, t;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  interval_gen dut (.clk, .rst_n, .sin_fall_i(sin_f), .sop_fall_i(sop_f), .d_o(d), .t_o(t));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    bit last_is_sin;  // last edge was a lone Sin edge
    int d_len_exp, d_len_seen, n_both;
    sin_f = 1'b0;
    sop_f = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(d == 1'b0 && t == 1'b1, "reset state");
    last_is_sin = 1'b0;
    d_len_exp = 0; d_len_seen = 0; n_both = 0;
    for (int i = 0; i < 20000; i++) begin
      int r;
      r = int'($urandom_range(99));
      sin_f = (r < 12) || (r >= 95);
      sop_f = (r >= 12 && r < 24) || (r >= 95);
      if (sin_f && sop_f) n_both++;
      @(posedge clk);
      #1;
      if (sop_f)      last_is_sin = 1'b0;
      else if (sin_f) last_is_sin = 1'b1;
      check(d == last_is_sin && t == !last_is_sin,
            $sformatf("cycle %0d: d=%0b t=%0b expected d=%0b", i, d, t, last_is_sin));
      if (last_is_sin) d_len_exp++;
      if (d) d_len_seen++;
    end
    check(d_len_exp == d_len_seen, "total d time");
    check(n_both > 100, "coincident edges exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
