// bin_median: counter-based median filter for binary (0/255) images.
//
// In a binary image the median of a K x K window is simply the majority
// value, so no sorting is needed: the block counts the window pixels that are
// 0 and outputs 0 when the count is greater than (K*K-1)/2, else 255. This
// counting scheme and the 5x5 window are the design's; the design runs the
// filter three times, which the core's sequencer does.
//
// Interface: window in, result out one cycle later with the same tag.
module bin_median
  import vein_pkg::*;
#(
  parameter int K = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  tag_t                 in_tag,
  input  logic [K*K-1:0][7:0]  win,
  output logic                 out_valid,
  output tag_t                 out_tag,
  output logic [7:0]           out_pix
);

  localparam int CW = $clog2(K * K + 1);

  logic [CW-1:0] zeros;

  always_comb begin
    zeros = '0;
    for (int i = 0; i < K * K; i++) zeros = zeros + CW'(win[i] == 8'd0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_tag <= in_tag;
    out_pix <= (zeros > CW'((K * K - 1) / 2)) ? PIX_OFF : PIX_ON;
  end

endmodule
