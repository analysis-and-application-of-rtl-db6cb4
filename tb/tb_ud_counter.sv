// tb_ud_counter: self-checking test of the up/down counter.
//
// Random combinations of up, down, preset and clear drive an 8-bit and a
// 4-bit instance. A reference count kept in the test (clear, else preset,
// else hold; then plus one, minus one or nothing, modulo 2**WIDTH) is
// compared with q_o every clock, and carry_o/borrow_o with the wrap
// conditions computed from the count before the clock.
module tb_ud_counter;
  logic       clk = 1'b0, rst_n, up, dn, ld, clr;
  logic [7:0] d8, q8;
  logic [3:0] q4;
  logic       c8, b8, c4, b4;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  ud_counter #(.WIDTH(8))                      dut8 (.clk, .rst_n, .up_i(up), .dn_i(dn), .load_i(ld),
                                                     .clr_i(clr), .d_i(d8), .q_o(q8), .carry_o(c8), .borrow_o(b8));
  ud_counter #(.WIDTH(4), .RST_VAL(4'd9))      dut4 (.clk, .rst_n, .up_i(up), .dn_i(dn), .load_i(ld),
                                                     .clr_i(clr), .d_i(d8[3:0]), .q_o(q4), .carry_o(c4), .borrow_o(b4));

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
    int m8, m4, n_carry, n_borrow;
    up = 0; dn = 0; ld = 0; clr = 0; d8 = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    m8 = 0; m4 = 9; n_carry = 0; n_borrow = 0;
    check(q8 == 8'd0 && q4 == 4'd9, "reset values");
    for (int i = 0; i < 30000; i++) begin
      int r, base8, base4, step;
      r = int'($urandom_range(99));
      // long runs one way so that both wraps happen
      up  = (i % 600 < 300) ? (r < 80) : (r < 10);
      dn  = (i % 600 < 300) ? (r >= 90) : (r >= 20);
      ld  = ($urandom_range(99) < 3);
      clr = ($urandom_range(99) < 2);
      d8  = 8'($urandom);
      #1;
      check(c8 == (up && !dn && m8 == 255) && b8 == (dn && !up && m8 == 0), "8-bit carry/borrow");
      check(c4 == (up && !dn && m4 == 15) && b4 == (dn && !up && m4 == 0), "4-bit carry/borrow");
      if (c8) n_carry++;
      if (b8) n_borrow++;
      base8 = clr ? 0 : ld ? int'(d8) : m8;
      base4 = clr ? 0 : ld ? int'(d8[3:0]) : m4;
      step  = (up && !dn) ? 1 : (dn && !up) ? -1 : 0;
      m8 = (base8 + step + 256) % 256;
      m4 = (base4 + step + 16) % 16;
      @(posedge clk);
      #1;
      check(q8 == 8'(m8), $sformatf("cycle %0d: q8=%0d expected %0d", i, q8, m8));
      check(q4 == 4'(m4), $sformatf("cycle %0d: q4=%0d expected %0d", i, q4, m4));
    end
    check(n_carry > 0 && n_borrow > 0, "both wraps exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
