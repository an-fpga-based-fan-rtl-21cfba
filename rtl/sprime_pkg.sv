// sprime_pkg: number formats and shared types of the fan-beam s' pipeline.
//
// The pipeline evaluates, for every pixel (x, y) of an N x N image and one
// projection angle theta, the detector coordinate
//     s' = (x cos(theta) + y sin(theta)) / U,   U = 1 + (x sin(theta) - y cos(theta)) / D
// with a 36-bit dividend, an 18-bit divisor and an 18-bit quotient, as the
// design calls for. The operand generator produces numerator and U by
// accumulation; a 9-stage radix-4 SRT divider (digits -2..2) divides them.
//
// Fixed-point formats (the bit counts 36/18/18 follow the design, the binary
// point positions are this implementation's choice):
//   numerator  : 36-bit signed, 24 fractional bits     (|num| <= 362 for N=512)
//   U          : 18-bit unsigned, 17 fractional bits   (0.29 < U < 1.71)
//   s'         : 18-bit signed,  6 fractional bits     (|s'| < 2048)
//   sin, cos   : 26-bit signed,  24 fractional bits
//   sin/D,cos/D: 36-bit signed,  34 fractional bits
//   U accumulator inside the generator: 36-bit signed, 34 fractional bits
// Partial remainder: 3 integer bits (sign included) and 18 fractional bits in
// the adder, plus a 19-bit tail of dividend bits not yet shifted in.
package sprime_pkg;

  // ---- sizes taken from the design ----
  localparam int unsigned DIVIDEND_W = 36;   // dividend (numerator) width
  localparam int unsigned DIVISOR_W  = 18;   // divisor (U) width
  localparam int unsigned QUOT_W     = 18;   // quotient (s') width
  localparam int unsigned N_STAGES   = 9;    // radix-4 stages, 2 quotient bits each
  localparam int unsigned QST_ADDR_W = 9;    // 6 remainder bits + 3 divisor bits
  localparam int unsigned QST_DATA_W = 4;    // EAB configured 512 x 4
  localparam int unsigned Y_EST_W    = 6;    // remainder bits examined
  localparam int unsigned D_EST_W    = 3;    // divisor bits examined

  // ---- formats chosen by this implementation ----
  localparam int unsigned NUM_FRAC   = 24;   // fractional bits of the numerator
  localparam int unsigned U_FRAC     = 17;   // fractional bits of U
  localparam int unsigned SP_FRAC    = 6;    // fractional bits of s'
  localparam int unsigned TRIG_W     = 26;   // sin / cos width
  localparam int unsigned TRIG_FRAC  = 24;
  localparam int unsigned TRIGD_W    = 36;   // sin/D, cos/D width
  localparam int unsigned UACC_W     = 36;   // U accumulator width
  localparam int unsigned UACC_FRAC  = 34;

  // partial remainder: 3 integer bits + DIVISOR_W fractional bits in the adder
  localparam int unsigned PR_W       = 3 + DIVISOR_W;          // 21
  // initial remainder w0 = num * 2^s / 2^37 has 37 fractional bits; the
  // bits below the adder are the tail shifted in two per stage
  localparam int unsigned W0_FRAC    = DIVIDEND_W + 1;         // 37
  localparam int unsigned TAIL_W     = W0_FRAC - DIVISOR_W;    // 19

  // Quotient digit as read from the selection table: one-hot magnitude and
  // sign, so the 4 table bits drive the divisor-multiple mux directly.
  typedef struct packed {
    logic neg;    // digit is negative
    logic two;    // |digit| == 2
    logic one;    // |digit| == 1
    logic zero;   // digit == 0
  } qdigit_t;

  // Partial remainder as carried between stages
  typedef struct packed {
    logic [PR_W-1:0]   active;  // two's complement, 3 int + 18 frac bits
    logic [TAIL_W-1:0] tail;    // dividend bits still to be shifted in
  } prem_t;

  // Encode a digit value -2..2 into the table word
  function automatic qdigit_t enc_digit(input int q);
    qdigit_t r;
    r.neg  = (q < 0);
    r.two  = (q == 2) || (q == -2);
    r.one  = (q == 1) || (q == -1);
    r.zero = (q == 0);
    return r;
  endfunction

  // Decode a table word to its digit value
  function automatic int dec_digit(input qdigit_t r);
    int m;
    m = r.two ? 2 : (r.one ? 1 : 0);
    return r.neg ? -m : m;
  endfunction

  // Quotient selection function for radix 4, digit set {-2..2}, residual
  // bound |w| <= (2/3) d. y_est is the 6-bit two's complement truncation of
  // 4w in units of 1/8 (y in [Y/8, (Y+1)/8)), d_est the 3 divisor bits after
  // the leading one (d in [(8+k)/16, (9+k)/16)). A digit q is chosen when the
  // whole rectangle lies inside its selection interval
  // [(q-2/3) d, (q+2/3) d]; all inequalities are scaled by 48 to integers.
  // Entries that the bounded residual never reaches hold digit 0.
  function automatic qdigit_t qsel(input logic [Y_EST_W-1:0] y_est,
                                   input logic [D_EST_W-1:0] d_est);
    int y, d;
    y = int'($signed(y_est));
    d = 8 + int'(d_est);
    if      (6*y >= -2*d && 6*(y+1) <= 2*d)      return enc_digit(0);
    else if (6*y >= d+1 && 6*(y+1) <= 5*d)       return enc_digit(1);
    else if (6*y >= -5*d && 6*(y+1) <= -(d+1))   return enc_digit(-1);
    else if (6*y >= 4*(d+1))                     return enc_digit(2);
    else if (6*(y+1) <= -4*d)                    return enc_digit(-2);
    else                                         return enc_digit(0);
  endfunction

endpackage
