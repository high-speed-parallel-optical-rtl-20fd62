// tb_qsd_ddp_array_adder -- end-to-end test of the array adder at its default
// size (10 x 2 arrays of 4-digit QSD numbers, results of 5 digits).
//
// 1. The worked example: twenty decimal pairs, each converted to QSD as the
//    sign times the base-4 digits of the magnitude, added in one operation.
//    Every result pixel must be one-hot, every result must equal the decimal
//    sum, and the first and last results must have the digit strings
//    1 3 3 3 2 (510) and -1 -3 -3 -3 -2 (-510).
// 2. Random operands with random redundant digits -3..3, sent with random
//    gaps and then back to back; a scoreboard checks every result.
// The result must appear two clock edges after the accept edge, and a full
//    input stream must be taken at one operation per two cycles. Coverage
//    counters make sure that every first-step group (digit-pair sums -6..6),
//    every result digit -3..3, a carry into the padded top digit, a
//    back-to-back accept and an idle gap all occurred.
module tb_qsd_ddp_array_adder;
  import qsd_ddp_pkg::*;
  import tb_qsd_ref_pkg::*;

  localparam int M = 10, N = 2, ND = 4;
  localparam int NUM = M * N, PIN = NUM * ND, POUT = NUM * (ND + 1);

  logic clk = 0, rst_n, in_valid, in_ready, out_valid, busy;
  qsd_digit_t [PIN-1:0]     a_digits, b_digits;
  logic [NDP-1:0][POUT-1:0] z_planes;

  qsd_ddp_array_adder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  // coverage
  int grp_seen [13];       // digit-pair sum -6..6
  int zdig_seen [7];       // result digit -3..3
  int top_carry = 0, back_to_back = 0, idle_gaps = 0;

  typedef int res_t [NUM];
  int   expq [$];      // NUM expected sums per accepted operation
  int   acc_cyc [$];
  int   last_accept = -100;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  function automatic int digit_at(int q, int d);
    logic [6:0] col;
    for (int k = 0; k < NDP; k++) col[k] = z_planes[k][q*(ND+1) + d];
    return onehot_val(col, 7, 3);
  endfunction

  // Expected sums of the operands on the inputs, and coverage of their digits.
  function automatic res_t expected_now();
    res_t e;
    for (int q = 0; q < NUM; q++) begin
      int va = 0, vb = 0, w = 1;
      for (int d = 0; d < ND; d++) begin
        int x = int'(a_digits[q*ND + d]);
        int y = int'(b_digits[q*ND + d]);
        va += x * w;
        vb += y * w;
        w *= 4;
        grp_seen[x + y + 6]++;
        if (d == ND - 1 && ref_carry(x, y) != 0) top_carry++;
      end
      e[q] = va + vb;
    end
    return e;
  endfunction

  // Record an accepted operation.
  always @(posedge clk) begin
    res_t e;
    cyc <= cyc + 1;
    if (rst_n && in_valid && in_ready) begin
      e = expected_now();
      foreach (e[q]) expq.push_back(e[q]);
      acc_cyc.push_back(cyc);
      if (cyc - last_accept == 2) back_to_back++;
      if (cyc - last_accept > 2) idle_gaps++;
      last_accept = cyc;
    end
  end

  // Value of result number q, or BAD if a digit pixel is not one-hot.
  function automatic int result_value(int q);
    int v = 0, w = 1;
    for (int d = 0; d <= ND; d++) begin
      int zd = digit_at(q, d);
      if (zd == BAD) return BAD;
      zdig_seen[zd + 3]++;
      v += zd * w;
      w *= 4;
    end
    return v;
  endfunction

  // Check every result against the scoreboard.
  always @(negedge clk) if (rst_n && out_valid) begin
    int ac, v, e;
    check(acc_cyc.size() > 0, "result without an accepted operation");
    if (acc_cyc.size() > 0) begin
      ac = acc_cyc.pop_front();
      check(cyc - ac == 3, $sformatf("latency: result %0d cycles after accept", cyc - ac - 1));
      for (int q = 0; q < NUM; q++) begin
        v = result_value(q);
        e = expq.pop_front();
        check(v == e, $sformatf("number %0d: got %0d, expected %0d", q, v, e));
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send();
    in_valid = 1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 0;
  endtask

  // The worked example, row by row (two numbers per row).
  localparam int EX_A [NUM] = '{255, 101, 132, 0, 50, 114, 31, 215, 49, -15,
                                172, 0, 247, -199, -76, 47, -89, -220, -255, 132};
  localparam int EX_B [NUM] = '{255, 209, 92, 0, -13, 69, -200, -205, -110, 30,
                                121, 100, -100, 250, 249, -47, -175, -113, -255, 39};
  // Expected digits, least significant first: 1 3 3 3 2 and -1 -3 -3 -3 -2.
  localparam int EX_FIRST [5] = '{2, 3, 3, 3, 1};
  localparam int EX_LAST  [5] = '{-2, -3, -3, -3, -1};

  initial begin
    int start_cyc;

    rst_n = 0; in_valid = 0; a_digits = '0; b_digits = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. worked example
    for (int q = 0; q < NUM; q++)
      for (int d = 0; d < ND; d++) begin
        a_digits[q*ND + d] = qsd_digit_t'(qsd_digit_of(EX_A[q], d));
        b_digits[q*ND + d] = qsd_digit_t'(qsd_digit_of(EX_B[q], d));
      end
    send();
    @(posedge out_valid); #1;
    for (int d = 0; d <= ND; d++) begin
      check(digit_at(0, d) == EX_FIRST[d], $sformatf("example 255+255 digit %0d", d));
      check(digit_at(NUM-2, d) == EX_LAST[d], $sformatf("example -255-255 digit %0d", d));
    end
    repeat (3) @(posedge clk);

    // 2. random operands, random gaps
    for (int i = 0; i < 60; i++) begin
      for (int p = 0; p < PIN; p++) begin
        a_digits[p] = qsd_digit_t'($urandom_range(6, 0) - 3);
        b_digits[p] = qsd_digit_t'($urandom_range(6, 0) - 3);
      end
      repeat ($urandom_range(2, 0)) @(posedge clk);
      #1 send();
    end

    // 3. back to back at full rate
    @(posedge clk); #1;
    start_cyc = cyc;
    in_valid = 1;
    for (int i = 0; i < 40; i++) begin
      for (int p = 0; p < PIN; p++) begin
        a_digits[p] = qsd_digit_t'($urandom_range(6, 0) - 3);
        b_digits[p] = qsd_digit_t'($urandom_range(6, 0) - 3);
      end
      do @(posedge clk); while (!in_ready);
      #1;
    end
    in_valid = 0;
    check(cyc - start_cyc <= 2 * 40 + 1,
          $sformatf("40 operations took %0d cycles at full rate", cyc - start_cyc));
    repeat (6) @(posedge clk);
    check(acc_cyc.size() == 0, "every accepted operation produced a result");

    // coverage
    for (int g = 0; g < 13; g++)
      check(grp_seen[g] > 0, $sformatf("first-step group with digit sum %0d seen", g - 6));
    for (int z = 0; z < 7; z++)
      check(zdig_seen[z] > 0, $sformatf("result digit %0d seen", z - 3));
    check(top_carry > 0, "carry into the padded top digit seen");
    check(back_to_back > 0, "back-to-back accept seen");
    check(idle_gaps > 0, "idle gap between operations seen");
    $display("coverage: top_carry=%0d back_to_back=%0d idle_gaps=%0d", top_carry,
             back_to_back, idle_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
