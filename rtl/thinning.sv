// thinning: one sub-iteration of Zhang-Suen thinning on a 3x3 window.
//
// Foreground is any non-zero pixel. With the neighbours named
// P2 (up), P3 (up-right), P4 (right), P5 (down-right), P6 (down),
// P7 (down-left), P8 (left), P9 (up-left), a foreground centre is deleted
// when it has 2..6 foreground neighbours (B), exactly one 0->1 transition in
// the circular sequence P2..P9,P2 (A), and
//   sub = 0: P2*P4*P6 = 0 and P4*P6*P8 = 0
//   sub = 1: P2*P4*P8 = 0 and P2*P6*P8 = 0.
// Alternating the two sub-iterations until nothing changes leaves lines one
// pixel wide. The design names a thinning step without describing it; the
// Zhang-Suen algorithm is this implementation's choice.
//
// Interface: window in, result (0 or 255) out one cycle later with the same
// tag; out_changed flags a deleted pixel.
module thinning
  import vein_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  tag_t             in_tag,
  input  logic [8:0][7:0]  win,
  input  logic             sub,
  output logic             out_valid,
  output tag_t             out_tag,
  output logic [7:0]       out_pix,
  output logic             out_changed
);

  logic [7:0] p;         // p[0] = P2 ... p[7] = P9, clockwise from the top
  logic [3:0] b, a;
  logic       c, del;

  always_comb begin
    p[0] = win[1] != 0;  p[1] = win[2] != 0;  p[2] = win[5] != 0;
    p[3] = win[8] != 0;  p[4] = win[7] != 0;  p[5] = win[6] != 0;
    p[6] = win[3] != 0;  p[7] = win[0] != 0;
    c = win[4] != 0;
    b = '0;
    a = '0;
    for (int i = 0; i < 8; i++) begin
      b = b + 4'(p[i]);
      a = a + 4'(!p[i] && p[(i + 1) % 8]);
    end
    del = c && (b >= 2) && (b <= 6) && (a == 1) &&
          (sub ? (!(p[0] && p[2] && p[6]) && !(p[0] && p[4] && p[6]))
               : (!(p[0] && p[2] && p[4]) && !(p[2] && p[4] && p[6])));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_changed <= 1'b0;
    end else begin
      out_valid   <= in_valid;
      out_changed <= in_valid && del;
    end
    out_tag <= in_tag;
    out_pix <= (c && !del) ? PIX_ON : PIX_OFF;
  end

endmodule
