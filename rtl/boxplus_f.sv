// boxplus_f: the f(a,b) unit of the SISO decoder, the "boxplus" of two LLRs.
//
//   f(a,b) = sign(a) sign(b) ( min(|a|,|b|) + ln(1+e^-(|a|+|b|)) - ln(1+e^-||a|-|b||) )
//
// The two correction terms come from the 3-bit table ldpc_pkg::fcorr; the
// result magnitude is clamped to [1, LLR_MAX]. The lower bound of one LSB is
// this design's choice: a sum of exactly zero would make every outgoing message
// of the row zero in the following g() step, so no information could ever
// flow back. Purely combinational.
// The formula and the table-based correction follow the source design; the
// rounding of the table is this design's choice (see ldpc_pkg).
module boxplus_f
  import ldpc_pkg::*;
(
  input  llr_t a,
  input  llr_t b,
  output llr_t y
);
  mag_t ma, mb, mn;
  logic [W-1:0] sum, dif;
  logic signed [W+1:0] m;
  logic neg;

  always_comb begin
    ma  = mag_of(a);
    mb  = mag_of(b);
    mn  = (ma < mb) ? ma : mb;
    sum = W'(ma) + W'(mb);
    dif = (ma > mb) ? W'(ma - mb) : W'(mb - ma);
    m   = $signed({3'b000, mn}) + $signed({7'd0, fcorr(sum)}) - $signed({7'd0, fcorr(dif)});
    if (m < 1) m = 1;   // never zero: keeps the boxminus g() invertible
    neg = a[W-1] ^ b[W-1];
    y   = neg ? sat(-m) : sat(m);
  end
endmodule
