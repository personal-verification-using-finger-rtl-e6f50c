// edge_track: one pass of Canny hysteresis edge tracking on a 3x3 window.
//
// A weak edge pixel (128) with at least one strong edge pixel (255) among its
// eight neighbours becomes strong, and out_changed reports the promotion.
// Repeating the pass until no pixel changes connects every weak edge that
// touches a chain of strong edges. With 'finalize' set, the pass instead turns
// every remaining weak pixel into background, leaving only strong edges.
// Promoting weak edges connected to strong ones is the design's; doing it by
// repeated 3x3 passes is this implementation's choice.
//
// Interface: window in, centre result out one cycle later with the same tag.
module edge_track
  import vein_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  tag_t             in_tag,
  input  logic [8:0][7:0]  win,
  input  logic             finalize,
  output logic             out_valid,
  output tag_t             out_tag,
  output logic [7:0]       out_pix,
  output logic             out_changed
);

  logic       strong_nb;
  logic [7:0] res;
  logic       chg;

  always_comb begin
    strong_nb = 1'b0;
    for (int i = 0; i < 9; i++)
      if (i != 4 && win[i] == PIX_ON) strong_nb = 1'b1;
    res = win[4];
    chg = 1'b0;
    if (win[4] == PIX_WEAK) begin
      if (finalize) begin
        res = PIX_OFF;
      end else if (strong_nb) begin
        res = PIX_ON;
        chg = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_changed <= 1'b0;
    end else begin
      out_valid   <= in_valid;
      out_changed <= in_valid && chg;
    end
    out_tag <= in_tag;
    out_pix <= res;
  end

endmodule
