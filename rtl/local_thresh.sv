// local_thresh: local (adaptive) thresholding over a K x K window (19x19).
//
// A pixel becomes vein (255) when it is darker than the mean of its K x K
// neighbourhood, else background (0). The mean is not divided out: the test
// is pixel*K*K < sum of the window. Pixels that are exactly 0, i.e. outside
// the finger region left by ROI extraction, stay background. Local
// thresholding with a 19x19 window is the design's; the mean rule and the
// zero-pixel rule are this implementation's choices.
//
// Interface: window in, result out one cycle later with the same tag.
module local_thresh
  import vein_pkg::*;
#(
  parameter int K = 19
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

  localparam int SW = $clog2(K * K * 255 + 1);

  logic [SW-1:0] sum, scaled;
  logic          vein;

  always_comb begin
    sum = '0;
    for (int i = 0; i < K * K; i++) sum = sum + SW'(win[i]);
    scaled = SW'(win[K*K/2]) * SW'(K * K);
    vein   = (win[K*K/2] != 8'd0) && (scaled < sum);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_tag <= in_tag;
    out_pix <= vein ? PIX_ON : PIX_OFF;
  end

endmodule
