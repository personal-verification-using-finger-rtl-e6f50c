// vein_core_run: end-to-end test bench body for vein_preproc_core, shared
// by the small-image and the full-size testbenches.
//
// It draws a synthetic finger image of W x H pixels: a dark background, a
// bright horizontal finger band whose upper and lower outlines wander from
// column to column, darker vein curves inside the finger, a faint stretch of
// outline and an isolated low-contrast patch (weak Canny edges that are
// and are not connected to strong ones) and noise. The image is streamed into
// the core, the whole chain is run, and both the median-filtered image and
// the final skeleton are read back and compared pixel by pixel with a
// behavioural model of the same chain built from vein_ref_pkg.
//
// Besides the pixel checks it counts how often each mechanism of the chain
// occurred in the model run (border clamping, weak edges, weak-to-strong
// promotion by edge tracking, pixels removed as weak, ROI masking, vein
// pixels found by thresholding, pixels flipped by the binary median, pixels
// removed by thinning) and counts a failure for any that never happened. The
// core's own pass counters must agree with the model's iteration counts.
// Afterwards every module is run on its own (single-module mode) on the
// model's input for that module and compared with the model's output.
// With CHAIN = 0 (an image too large for the three-region chain, up to the
// 131,072-pixel limit of single modules) only the single modules that need
// two regions are run, and the Gaussian filter works on the median image.
module vein_core_run #(
  parameter int W = 64,
  parameter int H = 48,
  parameter int MAX_ITER = 32,
  parameter bit CHAIN = 1'b1      // 0: image too large for the chain; single modules only
) (
  output logic done_o
);
  import vein_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [9:0]  img_w = 10'(W), img_h = 10'(H);
  logic [7:0]  t_high = 8'd30, t_low = 8'd12;
  logic        load_start = 1'b0, in_valid = 1'b0, start = 1'b0, run_one = 1'b0;
  vein_pkg::op_t op_sel = vein_pkg::OP_MEDIAN;
  logic        rd_start = 1'b0, rd_sel = 1'b0, rd_step = 1'b0;
  logic [7:0]  in_pix = '0, out_pix;
  logic        done, busy, out_valid;
  logic [31:0] stat_pass;
  logic [7:0]  stat_track_iter, stat_thin_iter;

  vein_preproc_core dut (.clk, .rst_n, .img_w, .img_h, .t_high, .t_low, .load_start, .in_valid,
    .in_pix, .start, .run_one, .op_sel, .done, .busy, .rd_start, .rd_sel, .rd_step, .out_valid, .out_pix,
    .stat_pass, .stat_track_iter, .stat_thin_iter);

  typedef int img_t[];

  // Mechanism counters of the model run.
  int n_clamp, n_weak, n_promote, n_dropweak, n_masked, n_vein, n_bmed_flip, n_thin_del;
  int track_iters, thin_iters;

  function automatic int px(const ref img_t im, input int x, input int y);
    if (x < 0) x = 0;
    if (x > W - 1) x = W - 1;
    if (y < 0) y = 0;
    if (y > H - 1) y = H - 1;
    return im[y * W + x];
  endfunction

  // op: 0 median7, 1 canny9, 2 track, 3 track final, 4 dilate, 5 gauss5,
  //     6 thresh19, 7 bin median5, 8 thin sub 0, 9 thin sub 1
  function automatic img_t wpass(const ref img_t src, input int op, output int nchg);
    img_t dst;
    int k, r0;
    int q[$];
    int a9[9], a25[25], a81[81];
    k = (op == 0) ? 7 : (op == 1) ? 9 : (op == 5 || op == 7) ? 5 : (op == 6) ? 19 : 3;
    r0 = k / 2;
    dst = new[W * H];
    nchg = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        q.delete();
        for (int r = 0; r < k; r++)
          for (int c = 0; c < k; c++) q.push_back(px(src, x + c - r0, y + r - r0));
        case (op)
          0: dst[y*W+x] = median_ref(q);
          1: begin foreach (a81[i]) a81[i] = q[i]; dst[y*W+x] = canny_ref(a81, int'(t_high), int'(t_low)); end
          2, 3: begin foreach (a9[i]) a9[i] = q[i]; dst[y*W+x] = track_ref(a9, op == 3); end
          4: begin foreach (a9[i]) a9[i] = q[i]; dst[y*W+x] = dilate_ref(a9); end
          5: begin foreach (a25[i]) a25[i] = q[i]; dst[y*W+x] = gauss_ref(a25); end
          6: dst[y*W+x] = thresh_ref(q);
          7: dst[y*W+x] = bmed_ref(q);
          default: begin foreach (a9[i]) a9[i] = q[i]; dst[y*W+x] = thin_ref(a9, op == 9); end
        endcase
        if (dst[y*W+x] != src[y*W+x]) nchg++;
      end
    return dst;
  endfunction

  img_t raw, med, roi, ga, thr, bm, cur, nxt, result;
  int n_single;

  task automatic model();
    int nc, nc0, nc1, top, bot;
    img_t ed;
    med = wpass(raw, 0, nc);
    if (!CHAIN) begin
      roi = med;
      cur = med;
    end else begin
    cur = wpass(med, 1, nc);
    foreach (cur[i]) if (cur[i] == 128) n_weak++;
    track_iters = 0;
    do begin
      nxt = wpass(cur, 2, nc);
      n_promote += nc;
      cur = nxt;
      track_iters++;
    end while (nc != 0 && track_iters < MAX_ITER);
    nxt = wpass(cur, 3, nc);
    n_dropweak += nc;
    cur = wpass(nxt, 4, nc);
    // region filling
    ed = cur;
    cur = new[W * H];
    for (int x = 0; x < W; x++) begin
      top = -1; bot = -1;
      for (int y = 0; y < H; y++)
        if (ed[y*W+x] != 0) begin
          if (top < 0) top = y;
          bot = y;
        end
      for (int y = 0; y < H; y++) begin
        cur[y*W+x] = (top >= 0 && y >= top && y <= bot) ? med[y*W+x] : 0;
        if (cur[y*W+x] == 0 && med[y*W+x] != 0) n_masked++;
      end
    end
    roi = cur;
    end
    cur = wpass(cur, 5, nc);
    ga = cur;
    cur = wpass(cur, 6, nc);
    thr = cur;
    foreach (cur[i]) if (cur[i] == 255) n_vein++;
    for (int i = 0; i < 3; i++) begin
      cur = wpass(cur, 7, nc);
      n_bmed_flip += nc;
    end
    bm = cur;
    thin_iters = 0;
    do begin
      nxt = wpass(cur, 8, nc0);
      cur = wpass(nxt, 9, nc1);
      n_thin_del += nc0 + nc1;
      thin_iters++;
    end while ((nc0 + nc1) != 0 && thin_iters < MAX_ITER);
    result = cur;
  endtask

  task automatic load(const ref img_t im);
    @(negedge clk);
    load_start = 1'b1;
    @(negedge clk);
    load_start = 1'b0;
    for (int i = 0; i < W * H; i++) begin
      in_valid = 1'b1;
      in_pix = 8'(im[i]);
      @(negedge clk);
    end
    in_valid = 1'b0;
  endtask

  task automatic run(input bit one, input vein_pkg::op_t op);
    @(negedge clk);
    run_one = one;
    op_sel = op;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
  endtask

  // One module on its own: load its input, run it, compare its output.
  task automatic single(input vein_pkg::op_t op, const ref img_t src, const ref img_t expv,
                        input int passes, input string what);
    load(src);
    run(1'b1, op);
    checks++;
    if (int'(stat_pass) != passes) begin
      failures++;
      $display("FAIL: %s ran %0d passes, expected %0d", what, stat_pass, passes);
    end
    readback(1'b0, expv, what);
    n_single++;
  endtask

  task automatic readback(input bit sel, const ref img_t expv, input string what);
    int n, bad;
    @(negedge clk);
    rd_sel = sel;
    rd_start = 1'b1;
    @(negedge clk);
    rd_start = 1'b0;
    rd_step = 1'b1;
    n = 0;
    bad = 0;
    while (n < W * H) begin
      @(negedge clk);
      if (out_valid) begin
        if (int'(out_pix) != expv[n]) begin
          bad++;
          if (bad < 6) $display("FAIL: %s pixel (%0d,%0d) got %0d exp %0d", what, n % W, n / W, out_pix, expv[n]);
        end
        n++;
      end
    end
    rd_step = 1'b0;
    checks += W * H;
    failures += bad;
  endtask

  initial begin
    int top[], bot[];
    real cyc_start, cyc;
    done_o = 1'b0;
    raw = new[W * H];
    top = new[W];
    bot = new[W];
    // Synthetic finger: band with wandering outline, veins and noise.
    for (int x = 0; x < W; x++) begin
      top[x] = H / 4 + int'(2.0 * $sin(real'(x) / 7.0));
      bot[x] = 3 * H / 4 + int'(2.0 * $cos(real'(x) / 9.0));
    end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        if (y >= top[x] && y <= bot[x]) begin
          v = 170;
          if (iabs(y - (H / 2 + int'(real'(H) / 8.0 * $sin(real'(x) / 10.0)))) <= 1) v = 110;
          if (iabs(x - (W / 3 + (y - H / 2) / 3)) <= 1) v = 115;
        end else begin
          v = 30;
          // a faint stretch of outline just outside the finger
          if (x > W / 2 && x < W / 2 + W / 8 && y == top[x] - 1) v = 60;
          // an isolated low-contrast patch that only gives weak edges
          if (y <= 8 && x >= W - 14 && x <= W - 5) v = 75;
        end
        v += $urandom_range(0, 12);
        if ($urandom_range(0, 60) == 0) v = $urandom_range(0, 255);   // salt and pepper
        raw[y * W + x] = v;
      end
    n_clamp = 0;
    model();
    // every border window clamps
    n_clamp = 2 * (W + H);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    n_single = 0;
    if (CHAIN) begin
      load(raw);
      cyc_start = $time / 10.0;
      run(1'b0, vein_pkg::OP_MEDIAN);
      cyc = $time / 10.0 - cyc_start;
      $display("chain: %0d passes, %0d tracking passes, %0d thinning sub-passes, %0.0f cycles",
               stat_pass, stat_track_iter, stat_thin_iter, cyc);
      checks++;
      if (int'(stat_track_iter) != track_iters || int'(stat_thin_iter) != 2 * thin_iters ||
          int'(stat_pass) != track_iters + 1 + 1 + 1 + 1 + 1 + 1 + 1 + 3 + 2 * thin_iters) begin
        failures++;
        $display("FAIL: pass counts differ from the model (track %0d, thin %0d)", track_iters, thin_iters);
      end
      readback(1'b1, med, "median");
      readback(1'b0, result, "skeleton");
    end
    $display("mechanisms: clamp=%0d weak=%0d promoted=%0d weak_dropped=%0d masked=%0d vein=%0d bmed_flips=%0d thin_removed=%0d",
             n_clamp, n_weak, n_promote, n_dropweak, n_masked, n_vein, n_bmed_flip, n_thin_del);
    checks++;
    if (n_clamp == 0 || n_vein == 0 || n_bmed_flip == 0 || n_thin_del == 0 ||
        (CHAIN && (n_weak == 0 || n_promote == 0 || n_dropweak == 0 || n_masked == 0))) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    // Each module on its own, as the host would time or use it.
    single(vein_pkg::OP_MEDIAN, raw, med, 1, "single median");
    if (CHAIN) begin
      single(vein_pkg::OP_ROI, med, roi, track_iters + 4, "single ROI");
      readback(1'b1, med, "kept grey image");
    end
    single(vein_pkg::OP_GAUSS, roi, ga, 1, "single gauss");
    single(vein_pkg::OP_THRESH, ga, thr, 1, "single threshold");
    single(vein_pkg::OP_BMED, thr, bm, 3, "single binary median");
    single(vein_pkg::OP_THIN, bm, result, 2 * thin_iters, "single thinning");
    checks++;
    if (n_single != (CHAIN ? 6 : 5)) failures++;
    $display("single-module runs: %0d", n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done_o = 1'b1;
    $finish;
  end

  // Watchdog: the chain and the single runs take far fewer than 800 cycles
  // per pixel.
  initial begin
    repeat (W * H * 800 + 100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
