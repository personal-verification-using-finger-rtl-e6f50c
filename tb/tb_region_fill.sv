// tb_region_fill: self-checking testbench for region_fill.
//
// An image_ram holds a random grey image and an edge map in which each column
// has random upper and lower boundary pixels, stray pixels between them, or
// no edge at all. After the pass, every output pixel is read from the RAM
// and compared with the grey pixel (between the first and last edge pixel of
// its column) or 0; the run length must be W*(2H+2) cycles plus at most 3.
module tb_region_fill;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        start = 1'b0, busy, f_we, tb_we = 1'b0, we;
  logic [17:0] raddr, f_waddr, tb_waddr = '0, waddr;
  logic [7:0]  rdata, f_wdata, tb_wdata = '0, wdata;
  logic [9:0]  img_w = '0, img_h = '0;
  logic [17:0] edge_base = '0, gray_base = '0, dst_base = '0;

  assign we    = tb_we | f_we;
  assign waddr = tb_we ? tb_waddr : f_waddr;
  assign wdata = tb_we ? tb_wdata : f_wdata;

  image_ram #(.ADDR_W(18), .DATA_W(8)) u_ram (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  region_fill #(.ADDR_W(18), .COORD_W(10)) dut (.clk, .rst_n, .start, .edge_base, .gray_base,
    .dst_base, .img_w, .img_h, .raddr, .rdata, .we(f_we), .waddr(f_waddr), .wdata(f_wdata), .busy);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int d);
    @(negedge clk);
    tb_we = 1'b1; tb_waddr = 18'(a); tb_wdata = 8'(d);
  endtask

  task automatic run(int w, int h);
    int e[], g[];
    int top, bot, cyc, exp_v, nfilled;
    e = new[w * h];
    g = new[w * h];
    edge_base = 18'(0); gray_base = 18'(w * h); dst_base = 18'(2 * w * h);
    img_w = 10'(w); img_h = 10'(h);
    for (int x = 0; x < w; x++) begin
      int kind = $urandom_range(0, 3);
      for (int y = 0; y < h; y++) e[y * w + x] = 0;
      if (kind != 0) begin
        int a = $urandom_range(0, h - 1);
        int b = $urandom_range(a, h - 1);
        e[a * w + x] = 255;
        e[b * w + x] = (kind == 3) ? 128 : 255;
        if (b > a + 1) e[$urandom_range(a + 1, b - 1) * w + x] = 255;
      end
    end
    for (int i = 0; i < w * h; i++) begin
      g[i] = $urandom_range(1, 255);
      wr(i, e[i]);
      wr(w * h + i, g[i]);
      wr(2 * w * h + i, 77);
    end
    @(negedge clk);
    tb_we = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (busy) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc < w * (2 * h + 2) || cyc > w * (2 * h + 2) + 3) begin
      failures++;
      $display("FAIL: took %0d cycles", cyc);
    end
    nfilled = 0;
    for (int x = 0; x < w; x++) begin
      top = -1; bot = -1;
      for (int y = 0; y < h; y++)
        if (e[y * w + x] != 0) begin
          if (top < 0) top = y;
          bot = y;
        end
      for (int y = 0; y < h; y++) begin
        exp_v = (top >= 0 && y >= top && y <= bot) ? g[y * w + x] : 0;
        if (exp_v != 0) nfilled++;
        checks++;
        if (int'(u_ram.mem[2 * w * h + y * w + x]) != exp_v) begin
          failures++;
          $display("FAIL: (%0d,%0d) got %0d exp %0d", x, y, u_ram.mem[2 * w * h + y * w + x], exp_v);
        end
      end
    end
    checks++;
    if (nfilled == 0 && w > 1) failures++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(12, 9);
    run(20, 15);
    run(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
