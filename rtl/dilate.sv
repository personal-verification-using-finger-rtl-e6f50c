// dilate: 3x3 morphological dilation of the edge map.
//
// The output pixel is the largest of the nine window pixels, so every edge
// pixel grows by one pixel in each direction, closing small gaps in the
// finger outline before the region is filled. Dilation is the design's edge
// smoothing step; the 3x3 square structuring element is this
// implementation's choice.
//
// Interface: window in, result out one cycle later with the same tag.
module dilate
  import vein_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  tag_t             in_tag,
  input  logic [8:0][7:0]  win,
  output logic             out_valid,
  output tag_t             out_tag,
  output logic [7:0]       out_pix
);

  logic [7:0] mx;

  always_comb begin
    mx = win[0];
    for (int i = 1; i < 9; i++)
      if (win[i] > mx) mx = win[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_tag <= in_tag;
    out_pix <= mx;
  end

endmodule
