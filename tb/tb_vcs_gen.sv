// tb_vcs_gen: self-checking testbench of the VCS generator.
//
// Random samples are offered with random gaps in in_valid. A model keeps the
// last two accepted samples and checks all five operands of the sample on
// the input, for every cycle, valid or not.
module tb_vcs_gen;
  import cpm_pkg::*;

  localparam int unsigned DW = 8;
  localparam int unsigned OW = DW + 1;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DW-1:0] x_in = '0;
  logic signed [OW-1:0] ops [NOPS];

  vcs_gen dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .ops(ops));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int h1 = 0, h2 = 0;  // model history x1[n-1], x1[n-2]

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      x_in     = DW'($urandom);
      if (it % 500 == 7) x_in = -128;
      #1;
      check("x1", int'(ops[OP_X1]), int'(x_in));
      check("x1+x1[-1]", int'(ops[OP_P1]), int'(x_in) + h1);
      check("x1-x1[-1]", int'(ops[OP_M1]), int'(x_in) - h1);
      check("x1+x1[-2]", int'(ops[OP_P2]), int'(x_in) + h2);
      check("x1-x1[-2]", int'(ops[OP_M2]), int'(x_in) - h2);
      @(posedge clk);
      if (in_valid) begin
        h2 = h1;
        h1 = int'(x_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
