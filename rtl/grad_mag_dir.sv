// grad_mag_dir: gradient magnitude and quantised direction for Canny.
//
// Magnitude: sqrt(dx^2 + dy^2) is replaced by the shift-and-add estimate
// max(7a/8 + b/2, a) with a = max(|dx|,|dy|) and b = min(|dx|,|dy|), as in the
// design. Direction: theta = atan2(dy, dx) is quantised to the four classes of
// the design (dir = class - 1):
//   0: 0-45 or 180-225 deg      1: 45-90 or 225-270 deg
//   2: 90-135 or 270-315 deg    3: 135-180 or 315-360 deg
// No arctangent is computed: the vector is first turned into the upper half
// plane (theta and theta+180 share a class) and then its class follows from
// the sign of dx and from comparing |dy| with |dx| (tan 45 = 1). A zero
// gradient falls in class 0. Lower bounds are inclusive, as in the design's
// table. Combinational.
module grad_mag_dir (
  input  logic signed [9:0] dx,
  input  logic signed [9:0] dy,
  output logic [9:0]        mag,
  output logic [1:0]        dir
);

  logic [9:0] ax, ay, mx, mn, est;
  logic signed [10:0] hx, hy;   // vector folded into 0 <= theta < 180
  logic [10:0] ahx;

  always_comb begin
    ax  = dx[9] ? 10'(-dx) : 10'(dx);
    ay  = dy[9] ? 10'(-dy) : 10'(dy);
    mx  = (ax > ay) ? ax : ay;
    mn  = (ax > ay) ? ay : ax;
    est = mx - (mx >> 3) + (mn >> 1);
    mag = (est > mx) ? est : mx;

    if (dy < 0 || (dy == 0 && dx < 0)) begin
      hx = -11'(dx);
      hy = -11'(dy);
    end else begin
      hx = 11'(dx);
      hy = 11'(dy);
    end
    ahx = hx[10] ? 11'(-hx) : 11'(hx);
    if (hx > 0) dir = (hy < hx) ? 2'd0 : 2'd1;
    else if (hx == 0) dir = (hy == 0) ? 2'd0 : 2'd2;
    else dir = (11'(hy) > ahx) ? 2'd2 : 2'd3;
  end

endmodule
