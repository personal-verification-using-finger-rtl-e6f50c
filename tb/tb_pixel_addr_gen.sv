// tb_pixel_addr_gen: self-checking testbench for pixel_addr_gen.
//
// Scans a 320x240 image (the reference image size) and smaller random
// images with random step gaps, checking x, y and the address
// base + y*W + x at every step, the 'last' flag and that busy drops after the
// final step. For 320x240 the corners must map to 0, 319, 76480 and 76799.
module tb_pixel_addr_gen;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        start = 1'b0, step = 1'b0;
  logic [17:0] base = '0, addr;
  logic [9:0]  img_w = 10'd320, img_h = 10'd240, x, y;
  logic        last, busy;

  pixel_addr_gen #(.ADDR_W(18), .COORD_W(10)) dut (.clk, .rst_n, .start, .step, .base,
    .img_w, .img_h, .addr, .x, .y, .last, .busy);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic scan(int w, int h, int b);
    img_w = 10'(w); img_h = 10'(h); base = 18'(b);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    for (int yy = 0; yy < h; yy++)
      for (int xx = 0; xx < w; xx++) begin
        checks++;
        if (!busy || x != 10'(xx) || y != 10'(yy) || int'(addr) != b + yy * w + xx ||
            last != (xx == w - 1 && yy == h - 1)) begin
          failures++;
          $display("FAIL: (%0d,%0d) got (%0d,%0d) addr %0d last %0b", xx, yy, x, y, addr, last);
        end
        if (w == 320 && ((xx == 319 && yy == 0 && addr != 18'd319) || (xx == 0 && yy == 239 && addr != 18'd76480)
            || (xx == 319 && yy == 239 && addr != 18'd76799))) begin
          failures++;
          $display("FAIL: corner address");
        end
        // Random gap before the step.
        repeat ($urandom_range(0, 1)) @(negedge clk);
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
      end
    checks++;
    if (busy) begin failures++; $display("FAIL: busy after scan"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    scan(320, 240, 0);
    scan(7, 5, 1000);
    scan(1, 1, 5);
    scan(13, 3, 76800);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
