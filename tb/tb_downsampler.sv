// tb_downsampler: self-checking testbench of the downsampler.
//
// R is set to 5 to keep the run short. Inputs are a counter (so the expected
// kept value is known) offered with random gaps in in_valid. Every output
// must be input m*R, come exactly one clock after it, and no other outputs
// may appear.
module tb_downsampler;
  localparam int unsigned W = 16;
  localparam int unsigned R = 5;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0] in_data = '0;
  logic out_valid;
  logic signed [W-1:0] out_data;

  downsampler #(.W(W), .R(R)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0;
  logic expect_out = 1'b0;
  int   expect_val = 0;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      // Output check for the sample driven one clock earlier.
      checks++;
      if (out_valid != expect_out) begin
        failures++;
        if (failures < 10) $display("cycle %0d: out_valid %0b expected %0b", it, out_valid, expect_out);
      end
      if (expect_out) begin
        checks++;
        n_out++;
        if (int'(out_data) != expect_val) begin
          failures++;
          if (failures < 10) $display("out_data %0d expected %0d", out_data, expect_val);
        end
      end
      in_valid = ($urandom % 3) != 0;
      in_data  = W'(n_in * 3 - 7000);
      expect_out = in_valid && (n_in % R == 0);
      expect_val = n_in * 3 - 7000;
      if (in_valid) n_in++;
    end
    checks++;
    if (n_out < 100) begin
      failures++;
      $display("too few outputs: %0d", n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
