// canny_nms: gradient, non-maximum suppression and hysteresis
// classification of the Canny edge detector on one 9x9 window.
//
// For each of the nine pixels of the 3x3 block around the window centre the
// block computes the horizontal gradient dx (derivative of Gaussian along the
// row) and the vertical gradient dy (along the column) with dog_gradient, and
// the magnitude G with grad_mag_dir; a 9x9 window is the smallest that holds
// the seven taps of all nine pixels. The centre keeps its G only if G is not
// smaller than either neighbour along its quantised gradient direction:
//   class 0 (near horizontal)  left and right neighbours
//   class 1 (45 deg)           lower-right and upper-left
//   class 2 (near vertical)    upper and lower neighbours
//   class 3 (135 deg)          lower-left and upper-right
// (rows grow downward, so a positive dy points down). The surviving G is then
// classified: G >= t_high -> 255 (strong edge), G >= t_low -> 128 (weak edge),
// else 0. The gradient, magnitude estimate, 3x3 computation of G and the
// suppression and hysteresis steps follow the design; the neighbour mapping,
// tie rule and pixel codes are this implementation's choices, and the
// thresholds are run-time inputs because the design gives no values.
//
// Interface: window in, classified centre pixel out one cycle later with the
// same tag.
module canny_nms
  import vein_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  tag_t               in_tag,
  input  logic [80:0][7:0]   win,
  input  logic [7:0]         t_high,
  input  logic [7:0]         t_low,
  output logic               out_valid,
  output tag_t               out_tag,
  output logic [7:0]         out_pix
);

  logic [9:0] g [3][3];
  logic [1:0] dir_c;

  for (genvar r = 0; r < 3; r++) begin : g_r
    for (genvar c = 0; c < 3; c++) begin : g_c
      // pixel (r+3, c+3) of the 9x9 window
      logic [6:0][7:0]   hrow, vcol;
      logic signed [9:0] dx, dy;
      logic [1:0]        dir;
      for (genvar t = 0; t < 7; t++) begin : g_t
        assign hrow[t] = win[(r + 3) * 9 + c + t];
        assign vcol[t] = win[(r + t) * 9 + c + 3];
      end
      dog_gradient u_dx (.pix(hrow), .grad(dx));
      dog_gradient u_dy (.pix(vcol), .grad(dy));
      grad_mag_dir u_md (.dx(dx), .dy(dy), .mag(g[r][c]), .dir(dir));
      if (r == 1 && c == 1) begin : g_centre
        assign dir_c = dir;
      end
    end
  end

  logic [9:0] n1, n2, gc;
  logic       keep;
  logic [7:0] cls;

  always_comb begin
    gc = g[1][1];
    unique case (dir_c)
      2'd0:    begin n1 = g[1][0]; n2 = g[1][2]; end
      2'd1:    begin n1 = g[2][2]; n2 = g[0][0]; end
      2'd2:    begin n1 = g[0][1]; n2 = g[2][1]; end
      default: begin n1 = g[2][0]; n2 = g[0][2]; end
    endcase
    keep = (gc >= n1) && (gc >= n2);
    if (keep && gc >= 10'(t_high))     cls = PIX_ON;
    else if (keep && gc >= 10'(t_low)) cls = PIX_WEAK;
    else                               cls = PIX_OFF;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_tag <= in_tag;
    out_pix <= cls;
  end

endmodule
