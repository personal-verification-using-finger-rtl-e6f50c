// tb_window_fetch: self-checking testbench for window_fetch.
//
// A random image is written into an image_ram; window_fetch (K = 5) then
// scans it. Every window is compared with the K x K neighbourhood taken from
// the testbench's copy of the image with coordinates clamped into the image,
// every tag with dst_base + y*W + x, and 'last' must mark only the final
// window. Images of 11x7, 3x2 (window larger than the image) and 1x1 are
// used, and the pass length must equal
// H * (K*(K+2) + 1 + (W-1)*(K+3)) cycles.
module tb_window_fetch;
  import vein_pkg::*;

  localparam int K = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic          start = 1'b0;
  logic [17:0]   src_base = '0, dst_base = '0, raddr, tb_waddr = '0;
  logic [9:0]    img_w = '0, img_h = '0;
  logic [7:0]    rdata, tb_wdata = '0;
  logic          tb_we = 1'b0;
  logic [K*K-1:0][7:0] win;
  logic          win_valid, busy;
  tag_t          win_tag;

  image_ram #(.ADDR_W(18), .DATA_W(8)) u_ram (.clk, .we(tb_we), .waddr(tb_waddr), .wdata(tb_wdata),
    .raddr, .rdata);

  window_fetch #(.K(K), .ADDR_W(18), .COORD_W(10)) dut (.clk, .rst_n, .start, .src_base, .dst_base,
    .img_w, .img_h, .raddr, .rdata, .win, .win_valid, .win_tag, .busy);

  int img[];
  int W, H, nwin;
  longint t_start, t_last;

  function automatic int pix(int x, int y);
    if (x < 0) x = 0;
    if (x > W - 1) x = W - 1;
    if (y < 0) y = 0;
    if (y > H - 1) y = H - 1;
    return img[y * W + x];
  endfunction

  always @(negedge clk) begin
    if (rst_n && win_valid) begin
      int x, y;
      bit bad;
      x = nwin % W;
      y = nwin / W;
      bad = 0;
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++)
          if (int'(win[r*K+c]) != pix(x + c - K/2, y + r - K/2)) bad = 1;
      if (int'(win_tag.addr) != int'(dst_base) + nwin) bad = 1;
      if (win_tag.last != (nwin == W * H - 1)) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        $display("FAIL: window %0d (%0d,%0d)", nwin, x, y);
      end
      nwin++;
      t_last = $time;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int w, int h, int sb, int db);
    longint expc;
    W = w; H = h;
    img = new[w * h];
    foreach (img[i]) begin
      img[i] = $urandom_range(0, 255);
      @(negedge clk);
      tb_we = 1'b1; tb_waddr = 18'(sb + i); tb_wdata = 8'(img[i]);
    end
    @(negedge clk);
    tb_we = 1'b0;
    img_w = 10'(w); img_h = 10'(h); src_base = 18'(sb); dst_base = 18'(db);
    nwin = 0;
    start = 1'b1;
    t_start = $time;
    @(negedge clk);
    start = 1'b0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (nwin != w * h) begin
      failures++;
      $display("FAIL: %0d windows, expected %0d", nwin, w * h);
    end
    expc = longint'(h) * (K * (K + 2) + 1 + (w - 1) * (K + 3));
    checks++;
    if ((t_last - t_start) / 10 != expc + 1) begin
      failures++;
      $display("FAIL: pass took %0d cycles, expected %0d", (t_last - t_start) / 10, expc + 1);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(11, 7, 100, 5000);
    run(3, 2, 0, 131072);
    run(1, 1, 77, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
