// ol_magnitude_comparator -- on-line magnitude comparator for higher-radix
// ordinary signed-digit numbers.
//
// Idea: X^2 - Y^2 = (X + Y)(X - Y). If either X + Y or X - Y is zero then
// |X| = |Y|; if their signs agree |X| > |Y|; if they differ |X| < |Y|. So a
// comparison needs one addition, one subtraction and two sign detections,
// and in a signed-digit system all four run most-significant-digit first:
//   - ol_sd_adder (add) turns X(i), Y(i) into the settled sum digit S(i+1),
//   - ol_sd_adder (subtract) turns them into the difference digit D(i+1),
//   - the signs E(i+1), F(i+1) of those digits feed two ol_sign_detector
//     instances that keep PE = PE phi E(i+1) and PF = PF phi F(i+1),
//   - after the last iteration M = PE * PF and the decision is
//     |X| = |Y| if PE = 0 or PF = 0, |X| > |Y| if M = 1, |X| < |Y| otherwise.
//
// Protocol: X and Y are presented one digit pair per cycle, most significant
// first, with valid/ready; in_last marks the least significant pair X(0),
// Y(0). For n digits the unit runs n + 1 iterations (i = n-1 .. -1): the
// cycle after the last pair it runs the extra iteration with X(-1) = Y(-1) = 0
// that settles S(0) and D(0), with in_ready low. The cycle after that,
// res_valid is high for one cycle with the decision and the final PE/PF.
// With in_valid held high, a comparison of n-digit numbers therefore takes
// n + 1 cycles and the result appears n + 1 cycles after the first digit is
// accepted; the next comparison may start in the cycle res_valid is high.
// The sum and difference digit streams (one digit longer than the operands)
// are brought out as well, with the digit signs and running signs of every
// iteration, valid when dig_valid is high.
//
// Taken from the published algorithm: the recurrence of every iteration, the decision rule,
// radix 4 with digit set {-3..3}, 3-bit two's-complement digits and 2-bit
// sign encoding. Own choices: the valid/ready/last protocol, the flush cycle
// produced inside the unit, the one-cycle result pulse, and reset behaviour
// (asynchronous, active low, clearing every register). CARRY_T selects the
// transfer threshold of both adders (see ol_sd_adder).
module ol_magnitude_comparator
  import olmc_pkg::*;
#(
  parameter int unsigned RADIX   = olmc_pkg::DEF_RADIX,
  parameter int unsigned ALPHA   = olmc_pkg::DEF_ALPHA,
  parameter int unsigned DW      = olmc_pkg::DEF_DIGIT_W,
  parameter int unsigned CARRY_T = ALPHA
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // operand digit stream, most significant first
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic                 in_last,    // this pair is X(0), Y(0)
  input  logic signed [DW-1:0] x_digit,
  input  logic signed [DW-1:0] y_digit,
  // on-line sum / difference digit streams, S(i+1) and D(i+1)
  output logic                 dig_valid,
  output logic signed [DW-1:0] sum_digit,
  output logic signed [DW-1:0] diff_digit,
  output sign_t                sum_sign,   // E(i+1)
  output sign_t                diff_sign,  // F(i+1)
  output sign_t                pe_run,     // PE after this iteration
  output sign_t                pf_run,     // PF after this iteration
  // comparison result
  output logic                 res_valid,
  output mag_rel_t             res_rel,
  output sign_t                res_pe,     // sign of X + Y
  output sign_t                res_pf,     // sign of X - Y
  output sign_t                res_m       // M = PE * PF
);

  // ---- iteration control -------------------------------------------------
  logic first_q;   // the next accepted pair is the most significant one
  logic flush_q;   // this cycle runs the extra iteration i = -1
  logic done_q;    // the previous cycle was the extra iteration
  logic accept;    // an operand pair is consumed this cycle
  logic iter;      // an iteration runs this cycle
  logic first;     // this iteration is i = n-1
  logic signed [DW-1:0] xi, yi;

  always_comb begin
    in_ready = !flush_q;
    accept   = in_valid && in_ready;
    iter     = accept || flush_q;
    first    = accept && first_q;
    xi       = flush_q ? '0 : x_digit;
    yi       = flush_q ? '0 : y_digit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_q <= 1'b1;
      flush_q <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      done_q <= flush_q;
      if (flush_q) begin
        flush_q <= 1'b0;
        first_q <= 1'b1;
      end else if (accept) begin
        first_q <= 1'b0;
        flush_q <= in_last;
      end
    end
  end

  // ---- on-line addition and subtraction ----------------------------------
  ol_sd_adder #(
    .RADIX(RADIX), .ALPHA(ALPHA), .DW(DW), .CARRY_T(CARRY_T), .SUBTRACT(1'b0)
  ) u_add (
    .clk, .rst_n, .en(iter), .first, .x(xi), .y(yi), .s(sum_digit)
  );

  ol_sd_adder #(
    .RADIX(RADIX), .ALPHA(ALPHA), .DW(DW), .CARRY_T(CARRY_T), .SUBTRACT(1'b1)
  ) u_sub (
    .clk, .rst_n, .en(iter), .first, .x(xi), .y(yi), .s(diff_digit)
  );

  // ---- digit signs E(i+1), F(i+1) ----------------------------------------
  function automatic sign_t digit_sign(logic signed [DW-1:0] d);
    if (d == '0)          return SGN_ZERO;
    else if (d[DW-1])     return SGN_NEG;
    else                  return SGN_POS;
  endfunction

  always_comb begin
    sum_sign  = digit_sign(sum_digit);
    diff_sign = digit_sign(diff_digit);
    dig_valid = iter;
  end

  // ---- on-line sign detection of X + Y and X - Y -------------------------
  sign_t pe, pf;

  ol_sign_detector u_sd_sum (
    .clk, .rst_n, .en(iter), .first, .e(sum_sign), .pa(pe), .pa_next(pe_run)
  );

  ol_sign_detector u_sd_diff (
    .clk, .rst_n, .en(iter), .first, .e(diff_sign), .pa(pf), .pa_next(pf_run)
  );

  // ---- decision ----------------------------------------------------------
  always_comb begin
    res_valid = done_q;
    res_pe    = pe;
    res_pf    = pf;
    res_m     = sign_mul(pe, pf);
    res_rel   = mag_decide(pe, pf);
  end

  // The flush iteration never overlaps an accepted operand pair.
  a_no_accept_in_flush: assert property (@(posedge clk) disable iff (!rst_n)
      flush_q |-> !accept)
    else $error("ol_magnitude_comparator: operand accepted during flush");

endmodule
