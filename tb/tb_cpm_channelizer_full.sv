// tb_cpm_channelizer_full: the channelizer at its default parameters.
//
// Defaults: one channel, the two-coefficient example filter
// (h(0) = 186/4096, h(1) = 185/4096), 8-bit input, decimation by 350.
// 3500 random input samples are applied back to back, so ten decimated
// outputs come out. Each must equal 186 x[m*350] + 185 x[m*350 - 1] (units of
// 2^-12) and arrive two clocks after its input sample; the output rate must be
// one in 350 input samples.
module tb_cpm_channelizer_full;
  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic signed [7:0] x_in = '0;
  logic              y_valid;
  logic signed [23:0] y_out [1];

  cpm_channelizer dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in),
    .y_valid(y_valid), .y_out(y_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_out = 0, n_in = 0;
  longint xprev = 0;
  longint exp_y [2];
  logic   exp_v [2];

  task automatic check(string what, longint got, longint exp);
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
    exp_v[0] = 1'b0;
    exp_v[1] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3502; it++) begin
      @(negedge clk);
      check("y_valid", longint'(y_valid), longint'(exp_v[1]));
      if (exp_v[1]) begin
        n_out++;
        check("decimated output", longint'(y_out[0]), exp_y[1]);
      end
      exp_v[1] = exp_v[0];
      exp_y[1] = exp_y[0];
      x_valid  = (it < 3500);
      x_in     = 8'($urandom);
      exp_v[0] = 1'b0;
      if (x_valid) begin
        if (n_in % 350 == 0) begin
          exp_v[0] = 1'b1;
          exp_y[0] = 186 * longint'(x_in) + 185 * xprev;
        end
        xprev = longint'(x_in);
        n_in++;
      end
    end
    check("decimated output count", n_out, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
