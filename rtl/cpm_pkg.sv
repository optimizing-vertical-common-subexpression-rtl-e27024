// cpm_pkg: types and constants shared by the coefficient-partitioned FIR filter.
//
// A coefficient multiplier is described at elaboration time by a tap plan
// (tap_plan_t). The plan lists the shift-and-add terms of one filter tap after
// three steps: the coefficient is written in canonic signed digit (CSD) form,
// digits that line up with digits of the next or next-but-one coefficient are
// replaced by one term on a vertical common subexpression (VCS) operand, and
// the remaining term list is split into an MSB sub-filter and an LSB
// sub-filter, each expressed relative to its own leading (most significant)
// term. The multiplier hardware (cpm_mult) is generated from this plan.
//
// Operand set (vcs_op_e), all derived from the input sample x1[n]:
//   OP_X1 : x1[n]                  (no subexpression)
//   OP_P1 : x1[n] + x1[n-1]        (VCS [1 1]    between h(k) and h(k+1))
//   OP_M1 : x1[n] - x1[n-1]        (VCS [1 -1])
//   OP_P2 : x1[n] + x1[n-2]        (VCS [1 0 1]  between h(k) and h(k+2))
//   OP_M2 : x1[n] - x1[n-2]        (VCS [1 0 -1])
// Negated versions of the four patterns are the same operand with the term
// sign flipped. The four patterns are the ones the method names; the operand
// encoding and the plan layout are this design's own.
package cpm_pkg;

  // Number of operands produced by the VCS generator.
  localparam int unsigned NOPS = 5;

  // Largest number of terms one tap can hold. A (B+1)-bit two's complement
  // coefficient has at most ceil((B+2)/2) nonzero CSD digits, so 12 covers
  // coefficient wordlengths up to 22 bits.
  localparam int unsigned MAX_TERMS = 12;

  // Width of shift/offset fields in a plan.
  localparam int unsigned SHW = 6;

  // Number of coefficient bit positions a digit vector can hold.
  localparam int unsigned MAXB = 32;

  typedef enum logic [2:0] {
    OP_X1 = 3'd0,
    OP_P1 = 3'd1,
    OP_M1 = 3'd2,
    OP_P2 = 3'd3,
    OP_M2 = 3'd4
  } vcs_op_e;

  // One shift-and-add term of a sub-filter: +/- operand << (span - off),
  // where off is the distance in bit positions from the sub-filter's order.
  typedef struct packed {
    logic           en;   // term present
    logic           neg;  // subtract (sign relative to the sub-filter's lead)
    vcs_op_e        op;   // operand
    logic [SHW-1:0] off;  // offset below the sub-filter's order
  } term_t;

  // Plan of one filter tap (one coefficient multiplier).
  // Tap value = (tap_neg ? -1 : 1) * T * 2^imin, with
  //   T  = (S_hi << gap) + (lo_neg ? -S_lo : S_lo)
  //   S_hi = sum of hi terms, S_lo = sum of lo terms (each term
  //          +/- op << (span - off) inside its sub-filter).
  typedef struct packed {
    logic                          nonzero;  // tap has at least one term
    logic                          has_lo;   // LSB sub-filter present
    logic                          tap_neg;  // sign of the tap's leading term
    logic                          lo_neg;   // LSB sub-filter sign relative to MSB one
    logic [SHW-1:0]                span_hi;  // span of the MSB sub-filter
    logic [SHW-1:0]                span_lo;  // span of the LSB sub-filter
    logic [SHW-1:0]                gap;      // inner shift applied before the final adder
    logic [SHW-1:0]                imin;     // weight of the tap's lowest digit (output alignment)
    logic [SHW-1:0]                span;     // PFP span M of the whole tap
    term_t [MAX_TERMS-1:0]         hi;       // MSB sub-filter terms
    term_t [MAX_TERMS-1:0]         lo;       // LSB sub-filter terms
  } tap_plan_t;

  // Signed-digit term list of one tap, one bit vector per operand and sign:
  // dp[op][i] = 1 means +op * 2^i, dn[op][i] = 1 means -op * 2^i, where 2^i is
  // the weight of bit i of the integer coefficient (coefficient value times
  // 2^B). A tap holds at most one term per bit position.
  typedef logic [NOPS-1:0][MAXB-1:0] digvec_t;

  // Pseudo floating-point coding and two-way partitioning of one tap.
  // The order (highest term) imax and lowest term imin give the span
  // M = imax - imin. Terms within floor(M/2) of the order form the MSB
  // sub-filter; the rest form the LSB sub-filter, which is rescaled by its own
  // order so that its adders only see its own (shorter) span.
  function automatic tap_plan_t plan_tap(digvec_t dp, digvec_t dn);
    tap_plan_t pl;
    int imax, imin, lo_max, half, nh, nl;
    logic sh, sl;
    pl = '0;
    imax = -1;
    imin = -1;
    for (int i = MAXB - 1; i >= 0; i--)
      for (int t = 0; t < NOPS; t++)
        if (dp[t][i] || dn[t][i]) begin
          if (imax < 0) imax = i;
          imin = i;
        end
    if (imax < 0) return pl;
    pl.nonzero = 1'b1;
    pl.span    = SHW'(imax - imin);
    half       = (imax - imin) / 2;
    // Sign of the leading digit of each sub-filter, and the LSB order.
    sh     = 1'b0;
    sl     = 1'b0;
    lo_max = -1;
    for (int i = MAXB - 1; i >= 0; i--)
      for (int t = 0; t < NOPS; t++)
        if (dp[t][i] || dn[t][i]) begin
          if (i == imax) sh = dn[t][i];
          if (imax - i > half && lo_max < 0) begin
            lo_max = i;
            sl     = dn[t][i];
          end
        end
    nh = 0;
    nl = 0;
    for (int i = MAXB - 1; i >= 0; i--)
      for (int t = 0; t < NOPS; t++)
        if ((dp[t][i] || dn[t][i]) && nh < MAX_TERMS && nl < MAX_TERMS) begin
          if (imax - i <= half) begin
            pl.hi[nh].en  = 1'b1;
            pl.hi[nh].neg = dn[t][i] ^ sh;
            pl.hi[nh].op  = vcs_op_e'(t);
            pl.hi[nh].off = SHW'(imax - i);
            pl.span_hi    = SHW'(imax - i);
            nh++;
          end else begin
            pl.lo[nl].en  = 1'b1;
            pl.lo[nl].neg = dn[t][i] ^ sl;
            pl.lo[nl].op  = vcs_op_e'(t);
            pl.lo[nl].off = SHW'(lo_max - i);
            pl.span_lo    = SHW'(lo_max - i);
            nl++;
          end
        end
    pl.has_lo  = (lo_max >= 0);
    pl.tap_neg = sh;
    pl.lo_neg  = sh ^ sl;
    pl.imin    = SHW'(imin);
    pl.gap     = (lo_max >= 0) ? SHW'((imax - int'(pl.span_hi)) - imin) : '0;
    return pl;
  endfunction

  // Plan of tap 0 of the two-coefficient example filter
  // h(0) = 2^-4 - 2^-6 - 2^-9 + 2^-11, h(1) = 2^-4 - 2^-6 - 2^-9 + 2^-12
  // (12 fractional bits, integer values 186 and 185): the digits at 2^-4,
  // 2^-6 and 2^-9 are shared with h(1) through x2 = x1 + x1[-1], leaving
  // +2^-11 x1. Partitioned: MSB part x2 - 2^-2 x2, LSB part
  // -2^-5 (x2 - 2^-2 x1).
  function automatic tap_plan_t example_plan();
    digvec_t dp, dn;
    dp = '0;
    dn = '0;
    dp[OP_P1][8] = 1'b1;
    dn[OP_P1][6] = 1'b1;
    dn[OP_P1][3] = 1'b1;
    dp[OP_X1][1] = 1'b1;
    return plan_tap(dp, dn);
  endfunction

endpackage
