// pixel_addr_gen: raster-order pixel address generator.
//
// Walks an img_w x img_h image x first, then y, and gives the buffer address
// of the current pixel, base + y*img_w + x, as in the pixel storage order of
// the design (a 320x240 image occupies addresses 0..76799 with row y starting
// at 320*y). The address is a running counter, so no multiplier is needed.
//
// Interface: a 'start' pulse loads (0,0) and raises busy. Each 'step' while
// busy moves to the next pixel; the step taken while 'last' is high ends the
// scan and drops busy. Outputs are registered and valid while busy.
module pixel_addr_gen
#(
  parameter int ADDR_W  = 18,
  parameter int COORD_W = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               step,
  input  logic [ADDR_W-1:0]  base,
  input  logic [COORD_W-1:0] img_w,
  input  logic [COORD_W-1:0] img_h,
  output logic [ADDR_W-1:0]  addr,
  output logic [COORD_W-1:0] x,
  output logic [COORD_W-1:0] y,
  output logic               last,
  output logic               busy
);

  assign last = busy && (x == img_w - 1'b1) && (y == img_h - 1'b1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      x    <= '0;
      y    <= '0;
      addr <= '0;
    end else if (start) begin
      busy <= 1'b1;
      x    <= '0;
      y    <= '0;
      addr <= base;
    end else if (busy && step) begin
      addr <= addr + 1'b1;
      if (last) begin
        busy <= 1'b0;
      end else if (x == img_w - 1'b1) begin
        x <= '0;
        y <= y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

endmodule
