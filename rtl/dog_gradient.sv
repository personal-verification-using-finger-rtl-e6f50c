// dog_gradient: one-dimensional first derivative of a Gaussian (sigma = 1)
// over seven pixels.
//
// The kernel (-0.0133, -0.1080, -0.2420, 0, 0.2420, 0.1080, 0.0133) is scaled
// by 10000 to integer weights 133, 1080 and 2420. Because the kernel is
// antisymmetric, the block first forms the three differences p[6]-p[0],
// p[5]-p[1], p[4]-p[2], multiplies them with shift-and-add trees
// (133 = 128+4+1, 1080 = 1024+32+16+8, 2420 = 2048+256+64+32+16+4) and then
// divides the sum by 10000 in div10000. For 8-bit pixels the gradient lies in
// -92..92. Weights, shift-and-add multiplication and the divide follow the
// design; the antisymmetric folding is this implementation's.
//
// Interface: pix[0] is the pixel at offset -3, pix[6] at +3. Combinational.
module dog_gradient (
  input  logic [6:0][7:0]    pix,
  output logic signed [9:0]  grad
);

  logic signed [9:0]  d3, d2, d1;
  logic signed [23:0] s3, s2, s1, sum, q;

  always_comb begin
    d3 = $signed({2'b00, pix[6]}) - $signed({2'b00, pix[0]});
    d2 = $signed({2'b00, pix[5]}) - $signed({2'b00, pix[1]});
    d1 = $signed({2'b00, pix[4]}) - $signed({2'b00, pix[2]});
    s3 = (24'(d3) <<< 7) + (24'(d3) <<< 2) + 24'(d3);
    s2 = (24'(d2) <<< 10) + (24'(d2) <<< 5) + (24'(d2) <<< 4) + (24'(d2) <<< 3);
    s1 = (24'(d1) <<< 11) + (24'(d1) <<< 8) + (24'(d1) <<< 6) + (24'(d1) <<< 5)
       + (24'(d1) <<< 4) + (24'(d1) <<< 2);
    sum = s3 + s2 + s1;
  end

  div10000 #(.IN_W(24)) u_div (.din(sum), .dout(q));

  assign grad = q[9:0];

endmodule
