// cpm_mult: shift-and-add coefficient multiplier of one filter tap, built by
// coefficient partitioning.
//
// The tap's terms (from the plan, see cpm_pkg) are split into an MSB
// sub-filter and an LSB sub-filter. Each sub-filter adds its terms relative to
// its own order, so its adders are only as wide as the operand plus that
// sub-filter's span:
//   S_hi = sum over hi terms of +/- ops[op] << (span_hi - off)
//   S_lo = sum over lo terms of +/- ops[op] << (span_lo - off)
// The final adder then applies the single inner shift (gap) between the two
// halves:
//   t_out = (S_hi << gap) + (lo_neg ? -S_lo : S_lo)
// The remaining factors of the tap, its sign (tap_neg) and its power-of-two
// weight 2^imin, are pure wiring and are applied by the adder that sums the
// taps (cpm_fir). For the example plan (the default), S_hi = 4*x2 - x2,
// S_lo = 4*x2 - x1 and t_out = 32*S_hi - S_lo, three adders after x2.
//
// Interface: purely combinational. ops[] are the OW-bit operands of this tap
// (x1 and its four VCS, delayed to this tap); t_out is T sign extended to PW
// bits. Adder widths inside follow the sub-filter spans; computing exactly
// (no bits are dropped by the shifts) is this design's choice, consistent
// with the method's operand range counting.
module cpm_mult
  import cpm_pkg::*;
#(
  parameter int unsigned OW   = 9,                // operand width
  parameter int unsigned PW   = 24,               // output width
  parameter tap_plan_t   PLAN = example_plan()    // terms of this tap
) (
  input  logic signed [OW-1:0] ops [NOPS],
  output logic signed [PW-1:0] t_out
);

  localparam int unsigned WHI = OW + int'(PLAN.span_hi) + 1;
  localparam int unsigned WLO = OW + int'(PLAN.span_lo) + 1;
  localparam int unsigned WT  = OW + int'(PLAN.span) + 2;

  logic signed [WHI-1:0] s_hi;   // MSB sub-filter sum
  logic signed [WLO-1:0] s_lo;   // LSB sub-filter sum (rescaled by its order)
  logic signed [WT-1:0]  t_sum;  // final adder

  always_comb begin
    s_hi = '0;
    for (int j = 0; j < int'(MAX_TERMS); j++) begin
      if (PLAN.hi[j].en) begin
        if (PLAN.hi[j].neg)
          s_hi = s_hi - (WHI'(ops[PLAN.hi[j].op]) <<< (PLAN.span_hi - PLAN.hi[j].off));
        else
          s_hi = s_hi + (WHI'(ops[PLAN.hi[j].op]) <<< (PLAN.span_hi - PLAN.hi[j].off));
      end
    end
  end

  always_comb begin
    s_lo = '0;
    for (int j = 0; j < int'(MAX_TERMS); j++) begin
      if (PLAN.lo[j].en) begin
        if (PLAN.lo[j].neg)
          s_lo = s_lo - (WLO'(ops[PLAN.lo[j].op]) <<< (PLAN.span_lo - PLAN.lo[j].off));
        else
          s_lo = s_lo + (WLO'(ops[PLAN.lo[j].op]) <<< (PLAN.span_lo - PLAN.lo[j].off));
      end
    end
  end

  always_comb begin
    t_sum = WT'(s_hi) <<< PLAN.gap;
    if (PLAN.has_lo) begin
      if (PLAN.lo_neg) t_sum = t_sum - WT'(s_lo);
      else             t_sum = t_sum + WT'(s_lo);
    end
  end

  assign t_out = PW'(t_sum);

endmodule
