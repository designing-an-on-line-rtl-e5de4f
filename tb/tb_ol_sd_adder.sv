// tb_ol_sd_adder -- self-checking testbench of the on-line signed-digit
// adder / subtractor.
//
// Four radix-4 instances run side by side on the same digit streams: add
// and subtract with the default transfer threshold (T = alpha = 3) and with
// T = 2; a radix-8 pair runs alongside. Checks:
//   - the radix-4 worked addition X = (-3 -1 1 0 -2 3), Y = (-1 3 3 2 0 -2)
//     gives exactly the sum digits (-1 0 3 0 2 -2 1) with T = 3;
//   - the worked comparison operands X = (1 2 -1 0 1), Y = (-1 0 -2 -1 -1)
//     give exactly the sum digits (0 1 -3 1 -1 0) and difference digits
//     (1 -1 -2 1 2 -2) with T = 2;
//   - random operands of 1..12 digits, with random idle cycles (en low)
//     between digits: every output digit lies in [-3, 3], the output stream
//     has n + 1 digits, and its value equals X + Y / X - Y computed with
//     integers;
//   - the same random checks for a radix-8 adder and subtractor (digit set
//     {-6..6}, 4-bit digits), to exercise the number-system parameters.
// Output digits appear in the same cycle as the input pair (on-line delay
// of one position, S(n) together with X(n-1)), which the sampling checks.
module tb_ol_sd_adder;
  localparam int R = 4;
  localparam int A = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic first = 1'b0;
  logic signed [2:0] x = '0, y = '0;
  logic signed [2:0] s3, d3, s2, d2;

  int checks = 0;
  int failures = 0;

  ol_sd_adder #(.SUBTRACT(1'b0)) u_add3 (.clk, .rst_n, .en, .first, .x, .y, .s(s3));
  ol_sd_adder #(.SUBTRACT(1'b1)) u_sub3 (.clk, .rst_n, .en, .first, .x, .y, .s(d3));
  ol_sd_adder #(.CARRY_T(2), .SUBTRACT(1'b0)) u_add2 (.clk, .rst_n, .en, .first, .x, .y, .s(s2));
  ol_sd_adder #(.CARRY_T(2), .SUBTRACT(1'b1)) u_sub2 (.clk, .rst_n, .en, .first, .x, .y, .s(d2));

  // radix 8, digit set {-6..6}, 4-bit digits, default threshold (6)
  logic signed [3:0] x8 = '0, y8 = '0;
  logic signed [3:0] s8, d8;
  ol_sd_adder #(.RADIX(8), .ALPHA(6), .DW(4), .SUBTRACT(1'b0)) u_add8 (.clk, .rst_n, .en, .first, .x(x8), .y(y8), .s(s8));
  ol_sd_adder #(.RADIX(8), .ALPHA(6), .DW(4), .SUBTRACT(1'b1)) u_sub8 (.clk, .rst_n, .en, .first, .x(x8), .y(y8), .s(d8));

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
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

  // radix-8 operands of the current operation (same length as the radix-4 ones)
  int x8d[$], y8d[$];

  // Streams of the six outputs for the operation just run, MSD first.
  int out_s3[$], out_d3[$], out_s2[$], out_d2[$], out_s8[$], out_d8[$];

  // Runs one operation: n digit pairs, then the flush iteration. Optional
  // idle cycles (en low) are inserted between iterations.
  task automatic run_op(input int xd[$], input int yd[$], input bit gaps);
    out_s3.delete(); out_d3.delete(); out_s2.delete(); out_d2.delete();
    out_s8.delete(); out_d8.delete();
    for (int k = 0; k <= xd.size(); k++) begin
      if (gaps) begin
        int idle = $urandom_range(0, 2);
        repeat (idle) begin
          @(negedge clk);
          en = 1'b0; first = 1'b0;
          x = 3'($urandom_range(0, 7)); y = 3'($urandom_range(0, 7));
          x8 = 4'($urandom_range(0, 15)); y8 = 4'($urandom_range(0, 15));
        end
      end
      @(negedge clk);
      en    = 1'b1;
      first = (k == 0);
      x     = (k < xd.size()) ? 3'(xd[k]) : 3'sd0;
      y     = (k < yd.size()) ? 3'(yd[k]) : 3'sd0;
      x8    = (k < x8d.size()) ? 4'(x8d[k]) : 4'sd0;
      y8    = (k < y8d.size()) ? 4'(y8d[k]) : 4'sd0;
      #1;
      out_s8.push_back(int'(s8)); out_d8.push_back(int'(d8));
      out_s3.push_back(int'(s3)); out_d3.push_back(int'(d3));
      out_s2.push_back(int'(s2)); out_d2.push_back(int'(d2));
    end
    @(negedge clk);
    en = 1'b0; first = 1'b0; x = '0; y = '0; x8 = '0; y8 = '0;
  endtask

  function automatic longint value8_of(int d[$]);
    longint v = 0;
    foreach (d[k]) v = v * 8 + longint'(d[k]);
    return v;
  endfunction

  function automatic longint value_of(int d[$]);
    longint v = 0;
    foreach (d[k]) v = v * R + longint'(d[k]);
    return v;
  endfunction

  function automatic bit in_range(int d[$]);
    foreach (d[k]) if (d[k] < -A || d[k] > A) return 1'b0;
    return 1'b1;
  endfunction

  task automatic check_stream(int got[$], int exp[$], string what);
    bit ok = (got.size() == exp.size());
    if (ok) foreach (exp[k]) if (got[k] != exp[k]) ok = 1'b0;
    check(ok, what);
    if (!ok) begin
      $write("  got:");  foreach (got[k]) $write(" %0d", got[k]);
      $write("  exp:");  foreach (exp[k]) $write(" %0d", exp[k]);
      $write("\n");
    end
  endtask

  initial begin
    int xd[$], yd[$];
    longint xv, yv;
    int n;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // worked addition, threshold alpha
    xd = '{-3, -1, 1, 0, -2, 3};
    yd = '{-1, 3, 3, 2, 0, -2};
    run_op(xd, yd, 1'b0);
    check_stream(out_s3, '{-1, 0, 3, 0, 2, -2, 1}, "worked addition, T=3");
    check(value_of(out_s3) == -64'sd3303, "worked addition value -3303");

    // worked comparison operands, threshold 2, exact digits
    xd = '{1, 2, -1, 0, 1};
    yd = '{-1, 0, -2, -1, -1};
    run_op(xd, yd, 1'b0);
    check_stream(out_s2, '{0, 1, -3, 1, -1, 0}, "comparison example sum digits, T=2");
    check_stream(out_d2, '{1, -1, -2, 1, 2, -2}, "comparison example difference digits, T=2");
    check(value_of(out_s3) == 64'sd76,  "comparison example X+Y = 76, T=3");
    check(value_of(out_d3) == 64'sd662, "comparison example X-Y = 662, T=3");

    // random operands, with and without idle cycles
    for (int t = 0; t < 3000; t++) begin
      n = $urandom_range(1, 12);
      xd.delete(); yd.delete();
      for (int k = 0; k < n; k++) begin
        xd.push_back($urandom_range(0, 2 * A) - A);
        yd.push_back($urandom_range(0, 2 * A) - A);
      end
      x8d.delete(); y8d.delete();
      for (int k = 0; k < n; k++) begin
        x8d.push_back($urandom_range(0, 12) - 6);
        y8d.push_back($urandom_range(0, 12) - 6);
      end
      xv = value_of(xd);
      yv = value_of(yd);
      run_op(xd, yd, t[0]);
      check(out_s3.size() == n + 1, "stream length n+1");
      check(in_range(out_s3) && in_range(out_d3) && in_range(out_s2) && in_range(out_d2),
            "output digits within the digit set");
      check(value_of(out_s3) == xv + yv, $sformatf("X+Y, T=3, n=%0d", n));
      check(value_of(out_d3) == xv - yv, $sformatf("X-Y, T=3, n=%0d", n));
      check(value_of(out_s2) == xv + yv, $sformatf("X+Y, T=2, n=%0d", n));
      check(value_of(out_d2) == xv - yv, $sformatf("X-Y, T=2, n=%0d", n));
      begin
        automatic bit ok8 = 1'b1;
        foreach (out_s8[k]) if (out_s8[k] < -6 || out_s8[k] > 6) ok8 = 1'b0;
        foreach (out_d8[k]) if (out_d8[k] < -6 || out_d8[k] > 6) ok8 = 1'b0;
        check(ok8, "radix-8 output digits within {-6..6}");
      end
      check(value8_of(out_s8) == value8_of(x8d) + value8_of(y8d), $sformatf("radix 8 X+Y, n=%0d", n));
      check(value8_of(out_d8) == value8_of(x8d) - value8_of(y8d), $sformatf("radix 8 X-Y, n=%0d", n));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
