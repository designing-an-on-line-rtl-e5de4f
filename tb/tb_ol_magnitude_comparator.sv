// tb_ol_magnitude_comparator -- end-to-end, self-checking testbench of the
// on-line magnitude comparator at its default parameters (radix 4, digit set
// {-3..3}, transfer threshold 3).
//
// Stimulus: comparisons of random n-digit signed-digit numbers, n = 1..16,
// including
//   - equal magnitudes written with different digits (Y is X recoded by
//     moving one unit between neighbouring positions, then possibly negated),
//     so |X| = |Y| is detected through PF = 0 (X = Y) or PE = 0 (X = -Y),
//   - the worked radix-4 example X = (1 2 -1 0 1), Y = (-1 0 -2 -1 -1),
//   - random gaps in in_valid, and back-to-back comparisons that start in the
//     cycle the previous result is shown.
// Reference: integer values of X and Y, computed in the testbench.
// Checks per comparison: decision, final PE = sign(X+Y), PF = sign(X-Y),
// M = PE*PF; the sum and difference streams have n + 1 digits in [-3, 3]
// and the values X + Y and X - Y; in_ready is low exactly in the flush
// cycle; the result appears two cycles after the last digit pair is
// accepted, i.e. n + 1 cycles after the first when there are no gaps.
// Every mechanism of the design is counted and must occur at least once.
module tb_ol_magnitude_comparator;
  import olmc_pkg::*;

  localparam int R = 4;
  localparam int A = 3;
  localparam int NMAX = 16;
  localparam int NOPS = 4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_last = 1'b0;
  logic signed [2:0] x_digit = '0, y_digit = '0;
  logic in_ready, dig_valid, res_valid;
  logic signed [2:0] sum_digit, diff_digit;
  sign_t sum_sign, diff_sign, pe_run, pf_run, res_pe, res_pf, res_m;
  mag_rel_t res_rel;

  ol_magnitude_comparator dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_last, .x_digit, .y_digit,
    .dig_valid, .sum_digit, .diff_digit, .sum_sign, .diff_sign,
    .pe_run, .pf_run, .res_valid, .res_rel, .res_pe, .res_pf, .res_m
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_gt = 0, n_lt = 0, n_eq_pe = 0, n_eq_pf = 0;
  int n_gap = 0, n_b2b = 0, n_flush_stall = 0;
  int n_top_carry_pos = 0, n_top_carry_neg = 0, n_recoded = 0, n_single = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  typedef struct {
    longint xv;
    longint yv;
    int     n;
    bit     gaps;
  } op_t;

  op_t    expq[$];
  longint cycle = 0;
  longint first_acc_cycle, last_acc_cycle;
  int     sum_s[$], diff_s[$];
  bit     in_op = 1'b0;
  bit     flush_expected = 1'b0;
  int     pending_ops = 0;

  function automatic longint value_of(int d[$]);
    longint v = 0;
    foreach (d[k]) v = v * R + d[k];
    return v;
  endfunction

  function automatic sign_t sgn(longint v);
    if (v == 0) return SGN_ZERO;
    return (v > 0) ? SGN_POS : SGN_NEG;
  endfunction

  function automatic longint labs(longint v);
    return (v < 0) ? -v : v;
  endfunction

  // ---- monitor ----------------------------------------------------------
  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      // the result of the previous comparison first: a new one may start
      // in the same cycle
      if (res_valid) begin
        op_t o;
        mag_rel_t exp_rel;
        automatic bit digits_ok = 1'b1;
        check(expq.size() > 0, "result with no comparison pending");
        if (expq.size() > 0) begin
          o = expq.pop_front();
          pending_ops--;
          if (labs(o.xv) == labs(o.yv))     exp_rel = MAG_EQ;
          else if (labs(o.xv) > labs(o.yv)) exp_rel = MAG_GT;
          else                              exp_rel = MAG_LT;
          check(res_rel == exp_rel,
                $sformatf("decision X=%0d Y=%0d got %s", o.xv, o.yv, res_rel.name()));
          check(res_pe == sgn(o.xv + o.yv), "PE is the sign of X+Y");
          check(res_pf == sgn(o.xv - o.yv), "PF is the sign of X-Y");
          check(res_m == sign_mul(sgn(o.xv + o.yv), sgn(o.xv - o.yv)), "M = PE*PF");
          check(sum_s.size() == o.n + 1 && diff_s.size() == o.n + 1, "n+1 output digits");
          foreach (sum_s[k])  if (sum_s[k]  < -A || sum_s[k]  > A) digits_ok = 1'b0;
          foreach (diff_s[k]) if (diff_s[k] < -A || diff_s[k] > A) digits_ok = 1'b0;
          check(digits_ok, "output digits within the digit set");
          check(value_of(sum_s)  == o.xv + o.yv, "sum stream value X+Y");
          check(value_of(diff_s) == o.xv - o.yv, "difference stream value X-Y");
          check(cycle - last_acc_cycle == 2, "result two cycles after the last digit");
          if (!o.gaps)
            check(cycle - first_acc_cycle == o.n + 1, "result n+1 cycles after the first digit");
          if (sum_s.size() > 0 && sum_s[0] > 0) n_top_carry_pos++;
          if (sum_s.size() > 0 && sum_s[0] < 0) n_top_carry_neg++;
          case (exp_rel)
            MAG_GT: n_gt++;
            MAG_LT: n_lt++;
            default: if (res_pe == SGN_ZERO) n_eq_pe++; else n_eq_pf++;
          endcase
        end
        sum_s.delete();
        diff_s.delete();
        in_op = 1'b0;
        if (in_valid && in_ready) n_b2b++;
      end
      if (in_valid && in_ready) begin
        if (!in_op) first_acc_cycle = cycle;
        in_op = 1'b1;
        last_acc_cycle = cycle;
      end
      if (!in_ready && in_valid) n_flush_stall++;
      check(in_ready == !flush_expected, "in_ready low exactly in the flush cycle");
      flush_expected = in_valid && in_ready && in_last;
      if (dig_valid) begin
        sum_s.push_back(int'(sum_digit));
        diff_s.push_back(int'(diff_digit));
      end
    end
  end

  // ---- driver -----------------------------------------------------------
  // Presents one comparison; returns after the last pair is accepted.
  task automatic drive_op(input int xd[$], input int yd[$], input bit gaps);
    op_t o;
    o.xv = value_of(xd); o.yv = value_of(yd); o.n = xd.size(); o.gaps = gaps;
    expq.push_back(o);
    pending_ops++;
    for (int k = 0; k < xd.size(); k++) begin
      if (gaps && $urandom_range(0, 2) == 0) begin
        in_valid = 1'b0;
        x_digit = 3'($urandom_range(0, 7)); y_digit = 3'($urandom_range(0, 7));
        n_gap++;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_last  = (k == xd.size() - 1);
      x_digit  = 3'(xd[k]);
      y_digit  = 3'(yd[k]);
      // in_ready only changes at a clock edge: as seen here it is what
      // the next edge samples
      while (!in_ready) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    in_last  = 1'b0;
  endtask

  // Y written differently with the same value: move one unit from a digit
  // (array index k-1, most significant first) into r units of the digit below
  // it (index k), or back, where the digit set allows it.
  function automatic void recode(ref int d[$]);
    for (int t = 0; t < 4; t++) begin
      int k = $urandom_range(1, d.size() - 1);
      if (d[k-1] > -A && d[k] + R <= A) begin
        d[k-1] -= 1; d[k] += R;
      end else if (d[k-1] < A && d[k] - R >= -A) begin
        d[k-1] += 1; d[k] -= R;
      end
    end
  endfunction

  initial begin
    int xd[$], yd[$];
    int n, kind;
    bit wait_result;

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // worked example: |X| > |Y|
    xd = '{1, 2, -1, 0, 1};
    yd = '{-1, 0, -2, -1, -1};
    drive_op(xd, yd, 1'b0);
    while (pending_ops > 0) @(negedge clk);

    for (int t = 0; t < NOPS; t++) begin
      n = $urandom_range(1, NMAX);
      if (n == 1) n_single++;
      xd.delete(); yd.delete();
      for (int k = 0; k < n; k++) xd.push_back($urandom_range(0, 2 * A) - A);
      kind = $urandom_range(0, 5);
      if (kind <= 1) begin
        // equal magnitude, possibly different digits
        yd = xd;
        if (n > 1) begin
          recode(yd);
          foreach (yd[k]) if (yd[k] != xd[k]) begin n_recoded++; break; end
        end
        if (kind == 1) foreach (yd[k]) yd[k] = -yd[k];
      end else if (kind == 2) begin
        // nearly equal: differ in the last digit only
        yd = xd;
        yd[n-1] = (yd[n-1] == A) ? A - 1 : yd[n-1] + 1;
        if ($urandom_range(0, 1) == 1) foreach (yd[k]) yd[k] = -yd[k];
      end else begin
        for (int k = 0; k < n; k++) yd.push_back($urandom_range(0, 2 * A) - A);
      end
      drive_op(xd, yd, $urandom_range(0, 3) == 0);
      // sometimes wait for the result, sometimes start the next at once
      wait_result = ($urandom_range(0, 3) == 0);
      if (wait_result) while (pending_ops > 0) @(negedge clk);
    end
    while (pending_ops > 0) @(negedge clk);
    repeat (3) @(negedge clk);

    check(n_gt > 0,            "mechanism: |X| > |Y| decided");
    check(n_lt > 0,            "mechanism: |X| < |Y| decided");
    check(n_eq_pe > 0,         "mechanism: |X| = |Y| through PE = 0");
    check(n_eq_pf > 0,         "mechanism: |X| = |Y| through PF = 0");
    check(n_recoded > 0,       "mechanism: equal values with different digits");
    check(n_gap > 0,           "mechanism: gap in the operand stream");
    check(n_flush_stall > 0,   "mechanism: flush iteration stalls the operand stream");
    check(n_b2b > 0,           "mechanism: back-to-back comparisons");
    check(n_top_carry_pos > 0 && n_top_carry_neg > 0, "mechanism: carry into the extra digit");
    check(n_single > 0,        "mechanism: one-digit operands");
    $display("gt=%0d lt=%0d eq(PE=0)=%0d eq(PF=0)=%0d recoded=%0d gaps=%0d flush_stalls=%0d b2b=%0d carry+=%0d carry-=%0d n1=%0d",
             n_gt, n_lt, n_eq_pe, n_eq_pf, n_recoded, n_gap, n_flush_stall, n_b2b,
             n_top_carry_pos, n_top_carry_neg, n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
