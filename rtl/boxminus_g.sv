// boxminus_g: the g(a,b) unit of the SISO decoder, the "boxminus" that removes
// one message b from a boxplus sum a.
//
//   g(a,b) = sign(a) sign(b) ( min(|a|,|b|) + ln(1-e^-(|a|+|b|)) - ln(1-e^-||a|-|b||) )
//
// It has the structure of boxplus_f with a different table: ldpc_pkg::gcorr
// holds -ln(1-e^-x), so the sum term is subtracted and the difference term
// added. The result magnitude is clamped to [0, LLR_MAX]. Combinational.
// Structure and formula follow the source design; the table values are this
// design's rounding.
module boxminus_g
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
    m   = $signed({3'b000, mn}) - $signed({7'd0, gcorr(sum)}) + $signed({7'd0, gcorr(dif)});
    if (m < 0) m = '0;
    neg = a[W-1] ^ b[W-1];
    y   = neg ? sat(-m) : sat(m);
  end
endmodule
