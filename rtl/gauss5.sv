// gauss5: 5x5 Gaussian low-pass filter.
//
// The output is the weighted sum of the 25 window pixels with the mask
//    1  4  7  4  1
//    4 16 26 16  4
//    7 26 41 26  7      divided by 273 (the sum of the weights),
//    4 16 26 16  4
//    1  4  7  4  1
// which smooths sharp grey-level transitions and high-frequency noise. The
// mask and the weighted sum are the design's. The division is done as a
// multiplication by 122911 followed by a right shift of 25; this equals the
// floor of sum/273 for every possible sum (0..69615).
//
// Interface: window in (row-major), result out one cycle later with the tag.
module gauss5
  import vein_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  tag_t              in_tag,
  input  logic [24:0][7:0]  win,
  output logic              out_valid,
  output tag_t              out_tag,
  output logic [7:0]        out_pix
);

  localparam int unsigned W [25] = '{1,  4,  7,  4, 1,
                                     4, 16, 26, 16, 4,
                                     7, 26, 41, 26, 7,
                                     4, 16, 26, 16, 4,
                                     1,  4,  7,  4, 1};

  logic [16:0] sum;
  logic [41:0] prod;

  always_comb begin
    sum = '0;
    for (int i = 0; i < 25; i++) sum = sum + 17'(W[i]) * 17'(win[i]);
    prod = 42'(sum) * 42'd122911;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_tag <= in_tag;
    out_pix <= prod[32:25];
  end

endmodule
