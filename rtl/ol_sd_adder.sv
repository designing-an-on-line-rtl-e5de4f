// ol_sd_adder -- on-line (most-significant-digit-first) adder / subtractor
// for the radix-r ordinary signed-digit number system.
//
// One digit position is handled per enabled clock cycle, from the most
// significant position down. In the iteration for position i the slice forms
//   P(i)  = X(i) + Y(i)              (Q(i) = X(i) - Y(i) when SUBTRACT = 1)
//   C(i)  = +1 if P(i) >= T, -1 if P(i) <= -T, else 0   (transfer digit)
//   S'(i) = P(i) - r*C(i)                                 (interim digit)
//   S(i+1) = S'(i+1) + C(i)                               (settled digit)
// S'(i) is kept in a register until the next iteration, where the transfer
// from the position below settles it. A settled digit never changes again,
// which is what makes the addition on-line: the output stream is one digit
// longer than the operands (S(n) comes out with X(n-1)), and an n-digit
// operation takes n+1 iterations, the last one with X = Y = 0 to flush S(0).
//
// Timing: the output digit s is combinational from x, y and the interim
// register; with first = 1 the interim digit of the previous operation is
// ignored (S'(n) = 0), so operations can follow one another without a gap.
//
// Interface: x, y, s are two's-complement digits of DW bits in
// [-ALPHA, ALPHA]; en advances the iteration; first marks the most
// significant digit of an operation.
//
// Taken from the published algorithm: the recurrence above, the digit set, the radix-4
// default, the two's-complement digit encoding. Own choices: the carry
// threshold T is a parameter (CARRY_T). The algorithm text uses T = alpha
// (the default); the worked radix-4 comparison example transfers a carry
// already at P = 2, which is CARRY_T = 2. Any T with r-alpha+1 <= T <= alpha
// keeps every digit in the digit set. Subtraction negates Y digit-wise
// (a signed-digit number is negated by negating each digit). Reset clears
// the interim register; the enable/first control is this design's own.
module ol_sd_adder #(
  parameter int unsigned RADIX    = olmc_pkg::DEF_RADIX,
  parameter int unsigned ALPHA    = olmc_pkg::DEF_ALPHA,
  parameter int unsigned DW       = olmc_pkg::DEF_DIGIT_W,
  parameter int unsigned CARRY_T  = ALPHA,
  parameter bit          SUBTRACT = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,     // process one digit position
  input  logic                 first,  // this is the most significant position
  input  logic signed [DW-1:0] x,      // X(i)
  input  logic signed [DW-1:0] y,      // Y(i)
  output logic signed [DW-1:0] s       // S(i+1) (or D(i+1) when subtracting)
);

  // Position sums need one bit more than a digit.
  localparam int unsigned PW = DW + 1;
  localparam logic signed [PW-1:0] R_S     = PW'(RADIX);
  localparam logic signed [PW-1:0] T_S     = PW'(CARRY_T);
  localparam logic signed [PW-1:0] ALPHA_S = PW'(ALPHA);

  logic signed [PW-1:0] y_ext;     // +Y(i) or -Y(i)
  logic signed [PW-1:0] p;         // P(i) or Q(i)
  logic signed [1:0]    c;         // C(i) or B(i)
  logic signed [PW-1:0] s_int;     // S'(i)
  logic signed [PW-1:0] s_int_q;   // S'(i+1), from the previous iteration
  logic signed [PW-1:0] s_full;    // S(i+1) before truncation to DW bits

  always_comb begin
    y_ext = SUBTRACT ? -PW'(y) : PW'(y);
    p     = PW'(x) + y_ext;
    if (p >= T_S)       c = 2'sd1;
    else if (p <= -T_S) c = -2'sd1;
    else                c = 2'sd0;
    s_int  = p - R_S * PW'(c);
    s_full = (first ? '0 : s_int_q) + PW'(c);
    s      = s_full[DW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s_int_q <= '0;
    else if (en) s_int_q <= s_int;
  end

  // The number system must be an ordinary signed-digit system and the
  // threshold must keep every settled digit within [-alpha, alpha].
  initial begin
    assert (2 * ALPHA > RADIX && ALPHA < RADIX)
      else $error("ol_sd_adder: need r/2 < alpha < r");
    assert (CARRY_T + ALPHA >= RADIX + 1 && CARRY_T <= ALPHA)
      else $error("ol_sd_adder: need r-alpha+1 <= CARRY_T <= alpha");
    assert (2 * ALPHA < (1 << DW))
      else $error("ol_sd_adder: DW too narrow for the digit set");
  end

  // Digits in and out stay within the digit set.
  property p_in_range;
    @(posedge clk) disable iff (!rst_n)
      en |-> (PW'(x) >= -ALPHA_S && PW'(x) <= ALPHA_S &&
              PW'(y) >= -ALPHA_S && PW'(y) <= ALPHA_S);
  endproperty
  property p_out_range;
    @(posedge clk) disable iff (!rst_n)
      en |-> (s_full >= -ALPHA_S && s_full <= ALPHA_S);
  endproperty
  a_in_range:  assert property (p_in_range)  else $error("ol_sd_adder: input digit out of range");
  a_out_range: assert property (p_out_range) else $error("ol_sd_adder: output digit out of range");

endmodule
