// ldpc_pkg: constants, types and arithmetic helpers shared by the LDPC decoder.
//
// Check and variable messages (Lambda, lambda) are W-bit two's-complement
// log-likelihood ratios with 2 fraction bits (one LSB = 0.25); the
// a-posteriori L messages have one bit more (WL), since L = lambda + Lambda
// must not clip while Lambda is still large (a clipped L would make the next
// lambda = L - Lambda lose the variable's own evidence). All arithmetic
// saturates to symmetric ranges, so a magnitude always fits in W-1 (WL-1) bits.
//
// The two 3-bit lookup tables approximate the correction terms of the boxplus
// f(a,b) and boxminus g(a,b) operations:
//   fcorr(x) = round(4 * ln(1 + exp(-x/4)))     (x in LSBs, result 0..3)
//   gcorr(x) = min(7, round(-4 * ln(1 - exp(-x/4))))   (result 0..7)
// The use of 3-bit correction tables follows the source design; the word
// length, fraction bits and table breakpoints are this design's choices.
//
// Array sizes default to the largest codes of IEEE 802.16e / 802.11n:
// k = 24 block columns, up to 12 layers, sub-matrix size z up to 96.
package ldpc_pkg;

  // datapath geometry
  localparam int unsigned Z_MAX  = 96;  // largest sub-matrix size (802.16e)
  localparam int unsigned KB     = 24;  // block columns of H
  localparam int unsigned JB_MAX = 12;  // largest number of layers
  localparam int unsigned PMAX   = 12;  // largest pairs per layer (row degree <= 24)
  localparam int unsigned EP_MAX = 56;  // pair slots in the code table (E <= 88, + padding)

  // message format
  localparam int unsigned W       = 8;
  localparam int          LLR_MAX = (1 << (W - 1)) - 1;
  localparam int unsigned WL      = W + 1;   // a-posteriori (L) messages
  localparam int          APP_MAX = (1 << (WL - 1)) - 1;

  localparam int unsigned ZW = $clog2(Z_MAX + 1);
  localparam int unsigned CW = $clog2(KB);
  localparam int unsigned LW = $clog2(JB_MAX);
  localparam int unsigned PW = $clog2(EP_MAX);

  typedef logic signed [W-1:0] llr_t;
  typedef logic [W-2:0]        mag_t;
  typedef logic signed [WL-1:0] app_t;
  typedef logic [WL-2:0]        amag_t;

  // one entry of the code table: two non-zero sub-matrices of a layer,
  // processed in the same cycle by the radix-4 datapath
  typedef struct packed {
    logic [CW-1:0] col0;
    logic [ZW-1:0] sh0;
    logic [CW-1:0] col1;
    logic [ZW-1:0] sh1;
    logic          v1;   // second element present (odd row degree pads it out)
  } pair_t;

  // saturate a wide signed value to the symmetric message range
  function automatic llr_t sat(input logic signed [W+1:0] v);
    localparam logic signed [W+1:0] HI = (W+2)'(LLR_MAX);
    if (v > HI)       return llr_t'(HI);
    else if (v < -HI) return llr_t'(-HI);
    else              return llr_t'(v);
  endfunction

  function automatic app_t sat_app(input logic signed [WL+1:0] v);
    localparam logic signed [WL+1:0] HI = (WL+2)'(APP_MAX);
    if (v > HI)       return app_t'(HI);
    else if (v < -HI) return app_t'(-HI);
    else              return app_t'(v);
  endfunction

  function automatic amag_t amag_of(input app_t v);
    logic signed [WL:0] a;
    a = {v[WL-1], v};
    if (a < 0) a = -a;
    if (a > (WL+1)'(APP_MAX)) a = (WL+1)'(APP_MAX);
    return amag_t'(a);
  endfunction

  function automatic mag_t mag_of(input llr_t v);
    localparam logic signed [W:0] HI = (W+1)'(LLR_MAX);
    logic signed [W:0] a;
    a = {v[W-1], v};
    if (a < 0) a = -a;
    if (a > HI) a = HI;
    return mag_t'(a);
  endfunction

  // ln(1+e^-x), 3-bit table
  function automatic logic [2:0] fcorr(input logic [W-1:0] x);
    if (x == 0)      return 3'd3;
    else if (x <= 3) return 3'd2;
    else if (x <= 8) return 3'd1;
    else             return 3'd0;
  endfunction

  // -ln(1-e^-x), 3-bit table (x = 0 clamps to 7)
  function automatic logic [2:0] gcorr(input logic [W-1:0] x);
    if (x == 0)      return 3'd7;
    else if (x == 1) return 3'd6;
    else if (x == 2) return 3'd4;
    else if (x == 3) return 3'd3;
    else if (x == 4) return 3'd2;
    else if (x <= 8) return 3'd1;
    else             return 3'd0;
  endfunction

endpackage
