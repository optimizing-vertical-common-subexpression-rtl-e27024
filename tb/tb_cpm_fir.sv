// tb_cpm_fir: self-checking testbench of the partitioned FIR channel filter.
//
// Two filters run on the same random input stream with random gaps in
// in_valid:
//   dut_ex  default parameters, the two-coefficient example
//           (y[n] = 186 x[n] + 185 x[n-1], units of 2^-12);
//   dut_rnd 16 taps of 16-bit coefficients from a fixed pseudo-random
//           generator, including full-scale, zero, equal and opposite
//           neighbours, so that every subexpression kind and both
//           sub-filters are used.
// The reference is the plain convolution of the accepted samples with the
// integer coefficients. Each output must arrive exactly one clock after its
// sample (latency 1) and y_valid must stay low otherwise.
module tb_cpm_fir;
  localparam int unsigned DW = 8;
  localparam int unsigned B  = 16;
  localparam int unsigned N  = 16;

  typedef logic [N-1:0][B:0] coefs_t;

  function automatic coefs_t gen_coefs();
    coefs_t c;
    int unsigned s;
    int v;
    s = 32'h2468ace1;
    for (int k = 0; k < int'(N); k++) begin
      s = s * 32'd1103515245 + 32'd12345;
      v = int'((s >> 8) % 32'd90001) - 45000;
      if (k == 3)  v = 65535;
      if (k == 4)  v = -65535;
      if (k == 7)  v = 0;
      if (k == 9)  v = int'($signed(c[8]));     // equal neighbours
      if (k == 11) v = -int'($signed(c[10]));   // opposite neighbours
      c[k] = (B+1)'(v);
    end
    return c;
  endfunction

  localparam coefs_t COEFS = gen_coefs();

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DW-1:0] x_in = '0;

  localparam int unsigned YW0 = DW + 12 + $clog2(3) + 2;
  localparam int unsigned YW1 = DW + B + $clog2(N + 1) + 2;
  logic                  yv0, yv1;
  logic signed [YW0-1:0] y0;
  logic signed [YW1-1:0] y1;

  cpm_fir dut_ex (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
                  .y_valid(yv0), .y_out(y0));

  cpm_fir #(.DW(DW), .B(B), .N(N), .COEFS(COEFS)) dut_rnd (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .y_valid(yv1), .y_out(y1));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint hist [N];
  longint exp0, exp1;
  logic   exp_valid = 1'b0;

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
    for (int k = 0; k < int'(N); k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      // Check what the previous clock edge produced.
      check("y_valid ex", longint'(yv0), longint'(exp_valid));
      check("y_valid rnd", longint'(yv1), longint'(exp_valid));
      if (exp_valid) begin
        check("example filter", longint'(y0), exp0);
        check("random filter", longint'(y1), exp1);
      end
      // New stimulus.
      in_valid = ($urandom % 5) != 0;
      x_in     = DW'($urandom);
      if (it % 97 == 5) x_in = -128;
      if (it % 89 == 3) x_in = 127;
      exp_valid = in_valid;
      if (in_valid) begin
        for (int k = int'(N) - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'(x_in);
        exp0 = 186 * hist[0] + 185 * hist[1];
        exp1 = 0;
        for (int k = 0; k < int'(N); k++)
          exp1 += longint'($signed(COEFS[k])) * hist[k];
      end
    end
    // The random coefficient set must have used every operand kind, an LSB
    // sub-filter and a tap emptied by its neighbours.
    begin
      int n_op [cpm_pkg::NOPS];
      int n_lo, n_empty;
      n_lo = 0;
      n_empty = 0;
      for (int t = 0; t < int'(cpm_pkg::NOPS); t++) n_op[t] = 0;
      for (int k = 0; k < int'(N); k++) begin
        if (dut_rnd.PLANS[k].has_lo) n_lo++;
        if (!dut_rnd.PLANS[k].nonzero) n_empty++;
        for (int j = 0; j < int'(cpm_pkg::MAX_TERMS); j++) begin
          if (dut_rnd.PLANS[k].hi[j].en) n_op[dut_rnd.PLANS[k].hi[j].op]++;
          if (dut_rnd.PLANS[k].lo[j].en) n_op[dut_rnd.PLANS[k].lo[j].op]++;
        end
      end
      $display("terms per operand x1/P1/M1/P2/M2: %0d %0d %0d %0d %0d, taps with LSB part %0d, empty taps %0d",
               n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_lo, n_empty);
      for (int t = 0; t < int'(cpm_pkg::NOPS); t++) check("operand kind used", longint'(n_op[t] > 0), 1);
      check("LSB sub-filter used", longint'(n_lo > 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
