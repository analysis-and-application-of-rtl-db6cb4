// tb_sign_gen: self-checking test of the sign generator.
//
// Random sequences of Sin and Sop edge pulses drive the block. The test keeps
// the list of edges since the last change of kind and predicts the state:
// a second Sin edge with no Sop edge between gives 0, a second Sop edge with
// no Sin edge between gives 1, anything else keeps the state.
module tb_sign_gen;
  logic clk = 1'b0, rst_n, sin_f, sop_f, sign;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  sign_gen dut (.clk, .rst_n, .sin_fall_i(sin_f), .sop_fall_i(sop_f), .sign_o(sign));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string hist;  // edges since reset, 'i' for Sin and 'o' for Sop, in time order
    bit    exp_sign;
    int    n0, n1;
    sin_f = 0; sop_f = 0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    hist = ""; exp_sign = 0; n0 = 0; n1 = 0;
    for (int i = 0; i < 20000; i++) begin
      int r, bias;
      // alternate phases where one of the two rates is faster
      bias = ((i / 500) % 2 != 0) ? 30 : 10;
      r = int'($urandom_range(99));
      sin_f = (r < bias) || (r >= 97);
      sop_f = (r >= bias && r < 40) || (r >= 97);
      if (sin_f) begin
        if (hist.len() > 0 && hist[hist.len()-1] == "i") exp_sign = 0;
        hist = {hist, "i"};
      end
      if (sop_f) begin
        if (hist.len() > 0 && hist[hist.len()-1] == "o") exp_sign = 1;
        hist = {hist, "o"};
      end
      if (hist.len() > 8) hist = hist.substr(hist.len() - 2, hist.len() - 1);
      @(posedge clk);
      #1;
      checks++;
      if (sign != exp_sign) begin
        failures++;
        $display("FAIL: cycle %0d: sign=%0b expected %0b", i, sign, exp_sign);
      end
      if (sign) n1++; else n0++;
    end
    checks++;
    if (n0 < 1000 || n1 < 1000) begin
      failures++;
      $display("FAIL: both states not exercised (%0d, %0d)", n0, n1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
