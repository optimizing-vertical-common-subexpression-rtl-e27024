// tb_damps_bank: the filter-bank channelizer with D-AMPS-sized channel
// filters: four channels of 260 taps (the shortest D-AMPS channel filter),
// 16-bit coefficients, decimation by 350. The number of channels is reduced
// from the 70 to 1134 of a full D-AMPS bank to keep the build short.
// Coefficients are generated per channel: symmetric, pseudo-random under an
// envelope that grows as the cube of the distance from the ends (small
// end-coefficients), with some zero, equal and opposite neighbours. A random wideband stream with
// random gaps in x_valid is applied. The reference convolves the accepted
// samples with each channel's integer coefficients and keeps filter output
// m*R; each kept output must appear on all channels exactly two clocks after
// its input sample, and y_valid must stay low otherwise.
//
// Mechanisms counted, each of which must occur at least once: terms on each
// of the five operands (x1 and the four vertical subexpressions), taps with an
// LSB sub-filter, taps with a negative leading digit, taps emptied entirely
// by their neighbours' subexpressions, input stalls, decimated outputs.
module tb_damps_bank;
  import cpm_pkg::*;

  localparam int unsigned DW  = 8;
  localparam int unsigned B   = 16;
  localparam int unsigned N   = 260;
  localparam int unsigned NCH = 4;
  localparam int unsigned R   = 350;
  localparam int unsigned YW  = DW + B + $clog2(N + 1) + 2;

  typedef logic [NCH-1:0][N-1:0][B:0] coefs_t;

  function automatic coefs_t gen_coefs();
    coefs_t c;
    int unsigned s;
    longint m, h, env, v;
    s = 32'h5eed1234;
    h = longint'(N) / 2;
    for (int ch = 0; ch < int'(NCH); ch++)
      for (int k = 0; k < int'(N / 2); k++) begin
        s   = s * 32'd1103515245 + 32'd12345;
        m   = longint'(k) + 1;
        env = 1 + (60000 * m * m / (h * h)) * m / h;
        v   = longint'(s >> 8) % 1000003 % (2 * env + 1) - env;
        if (k % 29 == 7)  v = 0;
        if (k % 31 == 11) v = longint'($signed(c[ch][k-1]));
        if (k % 37 == 13) v = -longint'($signed(c[ch][k-1]));
        c[ch][k]         = (B+1)'(v);
        c[ch][N - 1 - k] = (B+1)'(v);
      end
    return c;
  endfunction

  localparam coefs_t COEFS = gen_coefs();

  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic signed [DW-1:0] x_in = '0;
  logic                 y_valid;
  logic signed [YW-1:0] y_out [NCH];

  cpm_channelizer #(.DW(DW), .B(B), .N(N), .NCH(NCH), .R(R), .COEFS(COEFS)) dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in),
    .y_valid(y_valid), .y_out(y_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_dec = 0, n_in = 0;
  int n_op [NOPS];
  int n_lo = 0, n_neg = 0, n_empty = 0;
  longint hist [N];
  longint exp_y [2][NCH];   // pipeline of expected outputs, 2 clocks deep
  logic   exp_v [2];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic count_plan(tap_plan_t p);
    if (!p.nonzero) n_empty++;
    if (p.has_lo)   n_lo++;
    if (p.nonzero && p.tap_neg) n_neg++;
    for (int j = 0; j < int'(MAX_TERMS); j++) begin
      if (p.hi[j].en) n_op[p.hi[j].op]++;
      if (p.lo[j].en) n_op[p.lo[j].op]++;
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < int'(NOPS); t++) n_op[t] = 0;
    for (int k = 0; k < int'(N); k++) hist[k] = 0;
    exp_v[0] = 1'b0;
    exp_v[1] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      // Outputs of the sample driven two clocks ago.
      check("y_valid", longint'(y_valid), longint'(exp_v[1]));
      if (exp_v[1]) begin
        n_dec++;
        for (int c = 0; c < int'(NCH); c++) check("channel output", longint'(y_out[c]), exp_y[1][c]);
      end
      exp_v[1] = exp_v[0];
      exp_y[1] = exp_y[0];
      // New stimulus.
      x_valid = ($urandom % 4) != 0;
      x_in    = DW'($urandom);
      if (!x_valid) n_stall++;
      exp_v[0] = 1'b0;
      if (x_valid) begin
        for (int k = int'(N) - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'(x_in);
        if (n_in % int'(R) == 0) begin
          exp_v[0] = 1'b1;
          for (int c = 0; c < int'(NCH); c++) begin
            exp_y[0][c] = 0;
            for (int k = 0; k < int'(N); k++)
              exp_y[0][c] += longint'($signed(COEFS[c][k])) * hist[k];
          end
        end
        n_in++;
      end
    end
    for (int k = 0; k < int'(N); k++) begin
      count_plan(dut.g_ch[0].u_fir.PLANS[k]);
      count_plan(dut.g_ch[1].u_fir.PLANS[k]);
      count_plan(dut.g_ch[2].u_fir.PLANS[k]);
      count_plan(dut.g_ch[3].u_fir.PLANS[k]);
    end
    $display("terms on x1/P1/M1/P2/M2: %0d %0d %0d %0d %0d", n_op[0], n_op[1], n_op[2], n_op[3], n_op[4]);
    $display("LSB sub-filters %0d, negative taps %0d, empty taps %0d, stalls %0d, decimated outputs %0d",
             n_lo, n_neg, n_empty, n_stall, n_dec);
    for (int t = 0; t < int'(NOPS); t++) check("operand kind used", longint'(n_op[t] > 0), 1);
    check("LSB sub-filter used", longint'(n_lo > 0), 1);
    check("negative tap used", longint'(n_neg > 0), 1);
    check("empty tap seen", longint'(n_empty > 0), 1);
    check("input stall seen", longint'(n_stall > 0), 1);
    check("decimated outputs seen", longint'(n_dec >= 4), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
