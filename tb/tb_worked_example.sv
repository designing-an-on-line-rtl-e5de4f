// tb_worked_example -- the worked radix-4 comparison, iteration by iteration.
//
// X = (1 2 -1 0 1) = 369 and Y = (-1 0 -2 -1 -1) = -293 in radix 4 with
// digit set {-3..3}; |X| > |Y|. Two comparators run the same operands:
//   - u_t2 transfers a carry already at |P| >= 2 (CARRY_T = 2), the rule the
//     published iteration table follows; every row of that table is checked
//     for iterations i = 4 .. -1: S(i+1), D(i+1), E(i+1), F(i+1), PE, PF and
//     M = PE * PF.
//   - u_def uses the default threshold alpha = 3; its digits differ but its
//     rows are checked against values worked out by hand the same way:
//     S = (0 0 1 1 -1 0), D = (0 2 2 1 1 2).
// Both must decide |X| > |Y| with PE = PF = +1, n + 1 = 6 cycles after the
// first digit is accepted.
module tb_worked_example;
  import olmc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_last = 1'b0;
  logic signed [2:0] x_digit = '0, y_digit = '0;

  logic in_ready_2, dig_valid_2, res_valid_2;
  logic signed [2:0] sum_2, diff_2;
  sign_t e_2, f_2, pe_2, pf_2, rpe_2, rpf_2, rm_2;
  mag_rel_t rel_2;

  logic in_ready_3, dig_valid_3, res_valid_3;
  logic signed [2:0] sum_3, diff_3;
  sign_t e_3, f_3, pe_3, pf_3, rpe_3, rpf_3, rm_3;
  mag_rel_t rel_3;

  ol_magnitude_comparator #(.CARRY_T(2)) u_t2 (
    .clk, .rst_n, .in_valid, .in_ready(in_ready_2), .in_last, .x_digit, .y_digit,
    .dig_valid(dig_valid_2), .sum_digit(sum_2), .diff_digit(diff_2),
    .sum_sign(e_2), .diff_sign(f_2), .pe_run(pe_2), .pf_run(pf_2),
    .res_valid(res_valid_2), .res_rel(rel_2), .res_pe(rpe_2), .res_pf(rpf_2), .res_m(rm_2)
  );

  ol_magnitude_comparator u_def (
    .clk, .rst_n, .in_valid, .in_ready(in_ready_3), .in_last, .x_digit, .y_digit,
    .dig_valid(dig_valid_3), .sum_digit(sum_3), .diff_digit(diff_3),
    .sum_sign(e_3), .diff_sign(f_3), .pe_run(pe_3), .pf_run(pf_3),
    .res_valid(res_valid_3), .res_rel(rel_3), .res_pe(rpe_3), .res_pf(rpf_3), .res_m(rm_3)
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic sign_t s_of(int v);
    if (v == 0) return SGN_ZERO;
    return (v > 0) ? SGN_POS : SGN_NEG;
  endfunction

  // operands, most significant digit first
  const int XD[5] = '{1, 2, -1, 0, 1};
  const int YD[5] = '{-1, 0, -2, -1, -1};
  // iteration table rows for i = 4, 3, 2, 1, 0, -1 (threshold 2)
  const int S2[6]  = '{0, 1, -3, 1, -1, 0};
  const int D2[6]  = '{1, -1, -2, 1, 2, -2};
  const int E2[6]  = '{0, 1, -1, 1, -1, 0};
  const int F2[6]  = '{1, -1, -1, 1, 1, -1};
  const int PE2[6] = '{0, 1, 1, 1, 1, 1};
  const int PF2[6] = '{1, 1, 1, 1, 1, 1};
  const int M2[6]  = '{0, 1, 1, 1, 1, 1};
  // the same rows with the default threshold 3
  const int S3[6]  = '{0, 0, 1, 1, -1, 0};
  const int D3[6]  = '{0, 2, 2, 1, 1, 2};
  const int PE3[6] = '{0, 0, 1, 1, 1, 1};
  const int PF3[6] = '{0, 1, 1, 1, 1, 1};

  initial begin
    int it;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (it = 0; it < 6; it++) begin
      // iterations 0..4 take the operand digits, iteration 5 (i = -1) is the
      // flush the comparator runs by itself
      if (it < 5) begin
        in_valid = 1'b1;
        in_last  = (it == 4);
        x_digit  = 3'(XD[it]);
        y_digit  = 3'(YD[it]);
        check(in_ready_2 && in_ready_3, "operand accepted");
      end else begin
        in_valid = 1'b0;
        in_last  = 1'b0;
        check(!in_ready_2 && !in_ready_3, "flush iteration stalls the input");
      end
      #1;
      check(dig_valid_2 && dig_valid_3, "iteration runs");
      check(int'(sum_2) == S2[it],  $sformatf("S row, i=%0d", 4 - it));
      check(int'(diff_2) == D2[it], $sformatf("D row, i=%0d", 4 - it));
      check(e_2 == s_of(E2[it]),    $sformatf("E row, i=%0d", 4 - it));
      check(f_2 == s_of(F2[it]),    $sformatf("F row, i=%0d", 4 - it));
      check(pe_2 == s_of(PE2[it]),  $sformatf("PE row, i=%0d", 4 - it));
      check(pf_2 == s_of(PF2[it]),  $sformatf("PF row, i=%0d", 4 - it));
      check(sign_mul(pe_2, pf_2) == s_of(M2[it]), $sformatf("M row, i=%0d", 4 - it));
      check(int'(sum_3) == S3[it],  $sformatf("S (T=3), i=%0d", 4 - it));
      check(int'(diff_3) == D3[it], $sformatf("D (T=3), i=%0d", 4 - it));
      check(pe_3 == s_of(PE3[it]),  $sformatf("PE (T=3), i=%0d", 4 - it));
      check(pf_3 == s_of(PF3[it]),  $sformatf("PF (T=3), i=%0d", 4 - it));
      check(!res_valid_2 && !res_valid_3, "no result before the last iteration");
      @(negedge clk);
    end
    // 6 iterations done: the result is shown now, n + 1 = 6 cycles after the
    // first digit was accepted
    check(res_valid_2 && res_valid_3, "result after n+1 iterations");
    check(rel_2 == MAG_GT && rel_3 == MAG_GT, "|X| > |Y|");
    check(rpe_2 == SGN_POS && rpf_2 == SGN_POS && rm_2 == SGN_POS, "PE = PF = M = +1 (T=2)");
    check(rpe_3 == SGN_POS && rpf_3 == SGN_POS && rm_3 == SGN_POS, "PE = PF = M = +1 (T=3)");
    @(negedge clk);
    check(!res_valid_2 && !res_valid_3, "result is a one-cycle pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
