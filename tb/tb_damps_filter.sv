// tb_damps_filter: a channel filter at the size of the longest D-AMPS
// channel filter (1180 taps, 16-bit coefficients, 8-bit input).
//
// The coefficient values of such a filter are not part of this design, so a
// stand-in set is generated: symmetric (linear phase), with pseudo-random
// values under an envelope that grows as the cube of the distance from the
// ends, so that the end-coefficients are small and their CSD digits sit in
// the low bits, as in a long, sharp low-pass filter. The filter runs on a
// random input with gaps in in_valid; every output is compared with the
// plain convolution, and must come one clock after its sample. The test also
// reports how many terms of the filter use each operand and the total width of
// the multipliers' adders with and without partitioning, and requires the
// vertical subexpressions to have removed terms and the partitioning to have
// narrowed the adders.
module tb_damps_filter;
  import cpm_pkg::*;

  localparam int unsigned DW = 8;
  localparam int unsigned B  = 16;
  localparam int unsigned N  = 1180;
  localparam int unsigned YW = DW + B + $clog2(N + 1) + 2;

  typedef logic [N-1:0][B:0] coefs_t;

  function automatic coefs_t gen_coefs();
    coefs_t c;
    int unsigned s;
    longint m, h, env, v;
    s = 32'h0badcafe;
    h = longint'(N) / 2;
    for (int k = 0; k < int'(N / 2); k++) begin
      s   = s * 32'd1103515245 + 32'd12345;
      m   = longint'(k) + 1;
      env = 1 + (60000 * m * m / (h * h)) * m / h;
      v   = longint'(s >> 8) % 1000003 % (2 * env + 1) - env;
      c[k]         = (B+1)'(v);
      c[N - 1 - k] = (B+1)'(v);
    end
    return c;
  endfunction

  localparam coefs_t COEFS = gen_coefs();

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DW-1:0] x_in = '0;
  logic                 y_valid;
  logic signed [YW-1:0] y_out;

  cpm_fir #(.DW(DW), .B(B), .N(N), .COEFS(COEFS)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .y_valid(y_valid), .y_out(y_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint hist [N];
  longint exp_y;
  logic   exp_v = 1'b0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_op [NOPS];
    int n_digits, n_terms;
    longint bits_cpm, bits_pfp;
    int nh, nl, ow;
    for (int k = 0; k < int'(N); k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      check("y_valid", longint'(y_valid), longint'(exp_v));
      if (exp_v) check("filter output", longint'(y_out), exp_y);
      in_valid = ($urandom % 6) != 0;
      x_in     = DW'($urandom);
      exp_v    = in_valid;
      if (in_valid) begin
        for (int k = int'(N) - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'(x_in);
        exp_y = 0;
        for (int k = 0; k < int'(N); k++) exp_y += longint'($signed(COEFS[k])) * hist[k];
      end
    end
    // Term statistics of the generated multipliers.
    for (int t = 0; t < int'(NOPS); t++) n_op[t] = 0;
    n_terms = 0;
    for (int k = 0; k < int'(N); k++)
      for (int j = 0; j < int'(MAX_TERMS); j++) begin
        if (dut.PLANS[k].hi[j].en) begin n_op[dut.PLANS[k].hi[j].op]++; n_terms++; end
        if (dut.PLANS[k].lo[j].en) begin n_op[dut.PLANS[k].lo[j].op]++; n_terms++; end
      end
    // CSD digits before subexpression elimination: each subexpression term
    // stands for two digits.
    n_digits = n_op[0] + 2 * (n_op[1] + n_op[2] + n_op[3] + n_op[4]);
    $display("terms on x1/P1/M1/P2/M2: %0d %0d %0d %0d %0d (%0d terms for %0d CSD digits)",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_terms, n_digits);
    check("subexpressions removed terms", longint'(n_terms < n_digits), 1);
    // Adder bits of the partitioned multipliers against the same terms added
    // over the whole span (no partitioning): a z-term sum over span M needs
    // z-1 adders of OW + M + 1 bits; partitioned, each half's adders are only
    // OW + span_half + 1 bits and one joining adder is OW + M + 2 bits.
    ow = DW + 1;
    bits_cpm = 0;
    bits_pfp = 0;
    for (int k = 0; k < int'(N); k++) begin
      nh = 0;
      nl = 0;
      for (int j = 0; j < int'(MAX_TERMS); j++) begin
        if (dut.PLANS[k].hi[j].en) nh++;
        if (dut.PLANS[k].lo[j].en) nl++;
      end
      if (nh > 1) bits_cpm += (nh - 1) * (ow + int'(dut.PLANS[k].span_hi) + 1);
      if (nl > 1) bits_cpm += (nl - 1) * (ow + int'(dut.PLANS[k].span_lo) + 1);
      if (nl > 0) bits_cpm += ow + int'(dut.PLANS[k].span) + 2;
      if (nh + nl > 1) bits_pfp += (nh + nl - 1) * (ow + int'(dut.PLANS[k].span) + 1);
    end
    $display("multiplier adder bits: %0d partitioned, %0d unpartitioned", bits_cpm, bits_pfp);
    check("partitioning narrows the adders", longint'(bits_cpm < bits_pfp), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
