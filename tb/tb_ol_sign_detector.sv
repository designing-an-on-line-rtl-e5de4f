// tb_ol_sign_detector -- self-checking testbench of the on-line sign
// detector.
//
// Feeds random streams of digit signs (biased towards zero so that long
// leading-zero runs and all-zero numbers occur), most significant first,
// with random idle cycles between digits and back-to-back numbers. After
// every consumed digit the registered running sign must equal the sign of
// the first nonzero digit seen so far in the current number (zero if none),
// and pa_next must predict it one cycle ahead. During idle cycles the
// running sign must hold.
module tb_ol_sign_detector;
  import olmc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic first = 1'b0;
  sign_t e = SGN_ZERO;
  sign_t pa, pa_next;

  int checks = 0;
  int failures = 0;
  int n_all_zero = 0, n_pos = 0, n_neg = 0;

  ol_sign_detector dut (.clk, .rst_n, .en, .first, .e, .pa, .pa_next);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic sign_t rand_sign();
    int r = $urandom_range(0, 9);
    if (r < 6) return SGN_ZERO;
    return (r < 8) ? SGN_POS : SGN_NEG;
  endfunction

  initial begin
    sign_t ref_sign;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(pa == SGN_ZERO, "running sign is zero after reset");

    for (int t = 0; t < 2000; t++) begin
      n = $urandom_range(1, 10);
      ref_sign = SGN_ZERO;
      for (int k = 0; k < n; k++) begin
        // idle cycles: the running sign holds
        if ($urandom_range(0, 3) == 0) begin
          automatic sign_t held;
          held = pa;
          en = 1'b0; first = 1'b0; e = rand_sign();
          @(negedge clk);
          check(pa == held, "running sign holds while idle");
        end
        en    = 1'b1;
        first = (k == 0);
        e     = rand_sign();
        if (ref_sign == SGN_ZERO) ref_sign = e;
        #1;
        check(pa_next == ref_sign, "pa_next is the sign of the first nonzero digit");
        @(negedge clk);
        check(pa == ref_sign, "pa is the sign of the first nonzero digit");
      end
      en = 1'b0; first = 1'b0;
      case (ref_sign)
        SGN_ZERO: n_all_zero++;
        SGN_POS:  n_pos++;
        default:  n_neg++;
      endcase
    end
    check(n_all_zero > 0 && n_pos > 0 && n_neg > 0, "all three signs occurred");
    $display("numbers: zero=%0d positive=%0d negative=%0d", n_all_zero, n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
