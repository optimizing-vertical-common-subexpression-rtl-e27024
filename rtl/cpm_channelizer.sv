// cpm_channelizer: filter-bank channelizer for a software radio receiver.
//
// The wideband input x_in feeds NCH channel filters side by side; each filter
// has its own coefficient set (its own narrowband channel) and is followed by
// a downsampler by R. Every channel filter is a cpm_fir: its multipliers are
// shift-and-add networks built by vertical common subexpression elimination,
// pseudo floating-point coding and coefficient partitioning, which keep the
// adders narrow.
//
// Interface and timing: one wideband sample per clock at most, qualified by
// x_valid. Channel c's filter output is exact (units of 2^-B) and appears on
// y_out[c] with y_valid high for one clock, two clocks after input sample
// m*R (one clock in the filter, one in the downsampler). All channels share
// x_valid and so decimate in step; an assertion checks that they do.
//
// The filter bank with one filter per channel and the downsampling factor of
// 350 follow the source's channelizer. The source names no coefficients for
// its channel filters other than a two-coefficient worked example, so the
// defaults are that example as a single channel; a real channel plan is set
// through NCH, N, B and COEFS. Frequency translation of the channels ahead
// of the filters is not part of this block.
module cpm_channelizer #(
  parameter int unsigned DW  = 8,     // wideband sample width
  parameter int unsigned B   = 12,    // coefficient fractional bits
  parameter int unsigned N   = 2,     // taps per channel filter
  parameter int unsigned NCH = 1,     // number of channels
  parameter int unsigned R   = 350,   // decimation factor
  parameter logic [NCH-1:0][N-1:0][B:0] COEFS = {13'd185, 13'd186},
  parameter int unsigned YW  = DW + B + $clog2(N + 1) + 2  // output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic signed [DW-1:0] x_in,
  output logic                 y_valid,
  output logic signed [YW-1:0] y_out [NCH]
);

  logic [NCH-1:0] ds_valid;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic                 f_valid;
    logic signed [YW-1:0] f_out;

    cpm_fir #(.DW(DW), .B(B), .N(N), .COEFS(COEFS[c]), .YW(YW)) u_fir (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (x_valid),
      .x_in     (x_in),
      .y_valid  (f_valid),
      .y_out    (f_out)
    );

    downsampler #(.W(YW), .R(R)) u_ds (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (f_valid),
      .in_data   (f_out),
      .out_valid (ds_valid[c]),
      .out_data  (y_out[c])
    );
  end

  assign y_valid = ds_valid[0];

  // All channels see the same x_valid, so their decimators must stay in step.
  a_channels_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    ds_valid == {NCH{ds_valid[0]}})
    else $error("channel decimators out of step");

endmodule
