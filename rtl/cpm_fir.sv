// cpm_fir: low-complexity FIR channel filter whose coefficient multipliers are
// built by vertical common subexpression elimination (VCSE), pseudo
// floating-point (PFP) coding and two-way coefficient partitioning.
//
// y[n] = sum_{k=0}^{N-1} h(k) x[n-k], with h(k) = COEFS[k] / 2^B.
//
// How it works. At elaboration the function make_plans runs the design
// method on the coefficient set:
//   1. every coefficient is written in CSD form (non-adjacent form);
//   2. for k = 0..N-1, each remaining digit of h(k) that has a digit at the
//      same position in h(k+1) becomes one term on x1 + x1[-1] (same signs)
//      or x1 - x1[-1] (opposite signs); failing that, a digit of h(k+2) gives
//      x1 +/- x1[-2]; the partner digit is removed from the later
//      coefficient. Other digits stay terms on x1;
//   3. each tap's term list is coded as shift and span (PFP) and split into
//      an MSB and an LSB sub-filter at half the span (cpm_pkg::plan_tap).
// The hardware is then: one vcs_gen forming x1 and its four subexpressions
// once per sample, a tapped delay line that carries those operands, one
// cpm_mult per tap, and the adder that sums the taps. Tap signs and the
// power-of-two weights of the taps are applied in that adder as
// subtractions and hardwired shifts. Taps whose digits were all taken by an
// earlier tap cost no multiplier.
//
// Interface and timing: x_in is accepted when in_valid is high (one sample
// per clock at most; in_valid low holds the filter). y_out, the exact
// full-precision result in units of 2^-B, is registered: it appears with
// y_valid one clock after the sample that completes it (latency 1, one
// output per input). Reset clears the delay line.
//
// The method (steps 1-3, the VCS patterns, the half-span partition) follows
// the source; the direct-form structure, the greedy order in step 2
// (MSB first, neighbour k+1 before k+2), exact arithmetic and the
// valid/latency interface are this design's choices. The default
// coefficients are the two-coefficient worked example (h(0) = 186/4096,
// h(1) = 185/4096, 12 fractional bits, 8-bit input).
module cpm_fir
  import cpm_pkg::*;
#(
  parameter int unsigned     DW    = 8,                    // input sample width
  parameter int unsigned     B     = 12,                   // coefficient fractional bits
  parameter int unsigned     N     = 2,                    // number of taps
  parameter logic [N-1:0][B:0] COEFS = {13'd185, 13'd186}, // h(k) * 2^B, two's complement
  parameter int unsigned     YW    = DW + B + $clog2(N + 1) + 2  // output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x_in,
  output logic                 y_valid,
  output logic signed [YW-1:0] y_out
);

  localparam int unsigned OW = DW + 1;      // operand width (x1 and its VCS)
  localparam int unsigned PW = OW + B + 4;  // multiplier output width

  typedef tap_plan_t [N-1:0] plans_t;

  // Steps 1-3 of the method for the whole coefficient set.
  function automatic plans_t make_plans(logic [N-1:0][B:0] c);
    logic [N-1:0][B+1:0] rp, rn;  // remaining positive / negative CSD digits
    plans_t  pl;
    digvec_t dp, dn;
    longint  v;
    logic    neg;
    vcs_op_e op;
    rp = '0;
    rn = '0;
    // CSD (non-adjacent form) of each coefficient.
    for (int k = 0; k < int'(N); k++) begin
      v = longint'($signed(c[k]));
      for (int i = 0; i <= int'(B) + 1; i++) begin
        if ((v & 64'sd1) != 0) begin
          if ((v & 64'sd3) == 64'sd1) begin
            rp[k][i] = 1'b1;
            v = v - 1;
          end else begin
            rn[k][i] = 1'b1;
            v = v + 1;
          end
        end
        v = v >>> 1;
      end
    end
    // Vertical subexpressions, then PFP coding and partitioning per tap.
    for (int k = 0; k < int'(N); k++) begin
      dp = '0;
      dn = '0;
      for (int i = int'(B) + 1; i >= 0; i--) begin
        if (rp[k][i] || rn[k][i]) begin
          neg = rn[k][i];
          op  = OP_X1;
          if (k + 1 < int'(N) && (rp[k+1][i] || rn[k+1][i])) begin
            op = (rn[k+1][i] == neg) ? OP_P1 : OP_M1;
            rp[k+1][i] = 1'b0;
            rn[k+1][i] = 1'b0;
          end else if (k + 2 < int'(N) && (rp[k+2][i] || rn[k+2][i])) begin
            op = (rn[k+2][i] == neg) ? OP_P2 : OP_M2;
            rp[k+2][i] = 1'b0;
            rn[k+2][i] = 1'b0;
          end
          if (neg) dn[op][i] = 1'b1;
          else     dp[op][i] = 1'b1;
        end
      end
      pl[k] = plan_tap(dp, dn);
    end
    return pl;
  endfunction

  // A (B+1)-bit coefficient has at most floor((B+3)/2) CSD digits, which must
  // fit the term slots of a plan, and B+2 digit positions must fit a digit
  // vector.
  if ((B + 3) / 2 > MAX_TERMS || B + 2 > MAXB) begin : g_size_check
    $error("cpm_fir: coefficient wordlength B = %0d is too large for cpm_pkg", B);
  end

  localparam plans_t PLANS = make_plans(COEFS);

  // Operands of the current sample.
  logic signed [OW-1:0] ops_now [NOPS];

  vcs_gen #(.DW(DW), .OW(OW)) u_vcs (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x_in     (x_in),
    .ops      (ops_now)
  );

  // Tapped delay line of operands: tap_ops[k] belongs to sample n-k.
  logic signed [OW-1:0] tap_ops [N][NOPS];
  assign tap_ops[0] = ops_now;

  for (genvar k = 1; k < N; k++) begin : g_dly
    logic signed [OW-1:0] stage [NOPS];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int t = 0; t < int'(NOPS); t++) stage[t] <= '0;
      end else if (in_valid) begin
        stage <= tap_ops[k-1];
      end
    end
    assign tap_ops[k] = stage;
  end

  // One coefficient multiplier per tap.
  logic signed [PW-1:0] tap_t [N];

  for (genvar k = 0; k < N; k++) begin : g_tap
    if (PLANS[k].nonzero) begin : g_mult
      cpm_mult #(.OW(OW), .PW(PW), .PLAN(PLANS[k])) u_mult (
        .ops   (tap_ops[k]),
        .t_out (tap_t[k])
      );
    end else begin : g_zero
      assign tap_t[k] = '0;
    end
  end

  // Structural adder: sign and power-of-two weight of each tap are wiring.
  logic signed [YW-1:0] acc;

  always_comb begin
    acc = '0;
    for (int k = 0; k < int'(N); k++) begin
      if (PLANS[k].nonzero) begin
        if (PLANS[k].tap_neg) acc = acc - (YW'(tap_t[k]) <<< PLANS[k].imin);
        else                  acc = acc + (YW'(tap_t[k]) <<< PLANS[k].imin);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_out   <= '0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) y_out <= acc;
    end
  end

endmodule
