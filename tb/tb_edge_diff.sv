// tb_edge_diff: self-checking test of the falling-edge detector.
//
// A random pulse train (each phase two to nine clocks long, changing just
// after a rising clock edge) drives the detector. The test records the clock
// of every falling edge it drives and expects exactly one fall_o pulse for
// each, in the clock after the SYNC_STAGES-th rising edge that samples a_i low, and no other pulse.
module tb_edge_diff;
  localparam int unsigned STAGES = 2;
  localparam int unsigned LAT    = STAGES - 1;  // clocks between the first sampling edge and the pulse

  logic clk = 1'b0, rst_n, a, fall;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  bit   expect_q[$];

  always #5 clk = ~clk;

  edge_diff #(.SYNC_STAGES(STAGES)) dut (.clk, .rst_n, .a_i(a), .fall_o(fall));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_edges = 0, n_pulses = 0;
    bit hist[$];
    a = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < LAT; i++) hist.push_back(1'b0);
    for (int seg = 0; seg < 2000; seg++) begin
      bit nv;
      int len;
      nv  = ~a;
      len = 2 + int'($urandom_range(7));
      for (int j = 0; j < len; j++) begin
        bit fell;
        fell = (j == 0) && a && !nv;
        if (j == 0) a = nv;
        if (fell) n_edges++;
        hist.push_back(fell);
        @(posedge clk);
        #1;
        checks++;
        if (fall !== hist.pop_front()) begin
          failures++;
          $display("FAIL: fall_o=%0b at segment %0d", fall, seg);
        end
        if (fall) n_pulses++;
      end
    end
    checks++;
    if (n_edges < 900) begin
      failures++;
      $display("FAIL: too few edges driven");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
