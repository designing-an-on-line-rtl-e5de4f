// ol_sign_detector -- on-line sign detection of a signed-digit number whose
// digits arrive most significant first.
//
// The sign of a signed-digit number is the sign of its most significant
// nonzero digit. The detector keeps a running sign PA, starting at zero, and
// for each incoming digit sign E updates PA <- PA phi E, where K phi L is the
// sign of K when K is nonzero and the sign of L otherwise. Once a nonzero
// digit has been seen PA never changes again; after the last digit PA is the
// sign of the whole number (zero if every digit was zero).
//
// Interface: e is the sign of the current digit (olmc_pkg::sign_t, 2-bit
// two's-complement encoding of -1/0/+1). en consumes it; first marks the
// most significant digit and makes the update start from PA = 0, so a new
// number can follow the previous one without a gap. pa is the registered
// running sign, valid the cycle after each consumed digit; pa_next is the
// value it will take (combinational).
//
// Taken from the published algorithm: the phi recurrence and the sign encoding. Own choices:
// the en/first control and clearing PA at reset.
module ol_sign_detector
  import olmc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,       // consume one digit sign
  input  logic  first,    // the digit is the most significant one
  input  sign_t e,        // sign of the current digit
  output sign_t pa,       // running sign after the digits consumed so far
  output sign_t pa_next   // running sign including the current digit
);

  always_comb pa_next = sign_phi(first ? SGN_ZERO : pa, e);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pa <= SGN_ZERO;
    else if (en) pa <= pa_next;
  end

  // Once nonzero, the running sign is settled within an operation.
  a_settled: assert property (@(posedge clk) disable iff (!rst_n)
      (en && !first && pa != SGN_ZERO) |-> (pa_next == pa))
    else $error("ol_sign_detector: settled sign changed");

endmodule
