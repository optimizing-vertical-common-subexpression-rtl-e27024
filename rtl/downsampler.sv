// downsampler: keeps one sample in every R of a valid-qualified stream.
//
// A channel filter runs at the wideband sampling rate; the channel it
// extracts only needs the rate divided by R. A phase counter counts the
// valid input samples modulo R, and the sample taken at phase 0 is passed
// on, so output m is input sample m*R (counting from the first valid sample
// after reset).
//
// Interface and timing: in_data is taken when in_valid is high; out_data is
// registered and out_valid pulses for one clock, one clock after the kept
// sample. out_data holds its value between pulses. The factor R = 350 is the
// decimation of the channelizer's example; the choice of phase 0 and the
// registered output are this design's own.
module downsampler #(
  parameter int unsigned W = 24,    // sample width
  parameter int unsigned R = 350    // decimation factor
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);

  localparam int unsigned CW = (R > 1) ? $clog2(R) : 1;

  logic [CW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && (phase == '0);
      if (in_valid) begin
        if (phase == '0) out_data <= in_data;
        phase <= (phase == CW'(R - 1)) ? '0 : phase + 1'b1;
      end
    end
  end

endmodule
