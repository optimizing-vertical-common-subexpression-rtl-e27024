// tb_cpm_mult: self-checking testbench of the partitioned coefficient multiplier.
//
// Two instances are driven with random operands. The first uses the default
// plan (tap 0 of the two-coefficient example), whose result worked out by
// hand is 32*(4*x2 - x2) - (4*x2 - x1) = 92*x2 + x1. The second uses a plan
// with every operand kind, a negative leading digit and an LSB sub-filter;
// its reference is the plain signed-digit sum of the terms, which must equal
// -t_out (negative lead, lowest digit at 2^0).
module tb_cpm_mult;
  import cpm_pkg::*;

  localparam int unsigned OW = 9;
  localparam int unsigned PW = 24;

  function automatic tap_plan_t mixed_plan();
    digvec_t dp, dn;
    dp = '0;
    dn = '0;
    dn[OP_M1][10] = 1'b1;
    dp[OP_P2][7]  = 1'b1;
    dp[OP_X1][4]  = 1'b1;
    dn[OP_M2][2]  = 1'b1;
    dp[OP_X1][0]  = 1'b1;
    return plan_tap(dp, dn);
  endfunction

  logic [NOPS-1:0][OW-1:0] opv;  // driven by the stimulus loop
  logic signed [OW-1:0] ops [NOPS];
  for (genvar t = 0; t < NOPS; t++) begin : g_ops
    assign ops[t] = opv[t];
  end
  logic signed [PW-1:0] t_a, t_b;

  cpm_mult dut_a (.ops(ops), .t_out(t_a));
  cpm_mult #(.OW(OW), .PW(PW), .PLAN(mixed_plan())) dut_b (.ops(ops), .t_out(t_b));

  int checks = 0, failures = 0;
  longint ref_a, ref_b;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      for (int t = 0; t < int'(NOPS); t++) begin
        opv[t] = OW'($urandom);
        if (it == 0) opv[t] = 9'h100;        // most negative operand
        if (it == 1) opv[t] = 9'h0ff;        // most positive operand
      end
      #1;
      ref_a = 92 * longint'(ops[OP_P1]) + longint'(ops[OP_X1]);
      ref_b = -1024 * longint'(ops[OP_M1]) + 128 * longint'(ops[OP_P2])
              + 16 * longint'(ops[OP_X1]) - 4 * longint'(ops[OP_M2])
              + longint'(ops[OP_X1]);
      checks++;
      if (longint'(t_a) != ref_a) begin
        failures++;
        if (failures < 10) $display("example plan: got %0d expected %0d", t_a, ref_a);
      end
      checks++;
      if (-longint'(t_b) != ref_b) begin
        failures++;
        if (failures < 10) $display("mixed plan: got %0d expected %0d", -t_b, ref_b);
      end
    end
    // The example plan must have the partitioned shape: 2 + 2 terms, gap 5.
    checks++;
    if (dut_a.PLAN.span_hi != 2 || dut_a.PLAN.span_lo != 2 || dut_a.PLAN.gap != 5
        || !dut_a.PLAN.lo_neg || dut_a.PLAN.tap_neg || dut_a.PLAN.imin != 1) begin
      failures++;
      $display("example plan shape differs");
    end
    // Partitioning keeps the two half adders at 9 + 2 + 1 = 12 bits; only the
    // joining adder spans the whole coefficient (9 + 7 + 2 = 18 bits).
    checks++;
    if (dut_a.WHI != 12 || dut_a.WLO != 12 || dut_a.WT != 18) begin
      failures++;
      $display("adder widths %0d %0d %0d, expected 12 12 18", dut_a.WHI, dut_a.WLO, dut_a.WT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
