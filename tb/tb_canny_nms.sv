// tb_canny_nms: self-checking testbench for canny_nms.
//
// 9x9 windows holding noisy step edges at random angles and random textures, against the reference gradient,
// suppression and hysteresis; all three output classes must occur.
// Each window is given a tag with a running address; the monitor checks the
// output pixel against the reference model, the tag, and that the result
// appears exactly 1 cycle(s) after the window.
module tb_canny_nms;
  import vein_pkg::*;
  import vein_ref_pkg::*;

  localparam int NW  = 81;
  localparam int LAT = 1;
  localparam int NT  = 4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic              in_valid = 1'b0;
  tag_t              in_tag = '0;
  logic [NW-1:0][7:0] win = '0;
  logic              out_valid;
  tag_t              out_tag;
  logic [7:0]        out_pix;
  logic [7:0] t_high = 8'd30, t_low = 8'd12;
  canny_nms dut (.clk, .rst_n, .in_valid, .in_tag, .win, .t_high, .t_low, .out_valid, .out_tag, .out_pix);

  int     exp_q[$];
  int     chg_q[$];
  int     addr_q[$];
  longint t_q[$];
  int     w[NW];
  int     wq[$];
  int     seen[256] = '{default: 0};

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int e, a;
      longint t;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        e = exp_q.pop_front();
        a = addr_q.pop_front();
        t = t_q.pop_front();
        if (int'(out_pix) != e || int'(out_tag.addr) != a || ($time - t) / 10 != LAT) begin
          failures++;
          $display("FAIL: pix %0d exp %0d addr %0d exp %0d latency %0d", out_pix, e, out_tag.addr, a, ($time - t) / 10);
        end
        seen[e]++;

      end
    end
  end

  // Watchdog.
  initial begin
    repeat (NT * 4 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NT; n++) begin
      @(negedge clk);
      begin
        real ang, ca, sa, off;
        int lo, hi, mode;
        ang = $urandom_range(0, 359) * PI / 180.0;
        ca = $cos(ang); sa = $sin(ang);
        off = ($urandom_range(0, 40) - 20) / 10.0;
        lo = $urandom_range(0, 120); hi = lo + $urandom_range(0, 135);
        mode = $urandom_range(0, 3);
        for (int r = 0; r < 9; r++)
          for (int c = 0; c < 9; c++)
            if (mode == 0) w[r*9+c] = $urandom_range(0, 255);
            else w[r*9+c] = (((c - 4) * ca + (r - 4) * sa) > off ? hi : lo) + $urandom_range(0, 6);
      end
      foreach (w[i]) win[i] = 8'(w[i]);
      wq.delete();
      foreach (w[i]) wq.push_back(w[i]);
      e = canny_ref(w, int'(t_high), int'(t_low));
      exp_q.push_back(e);
      addr_q.push_back(n);
      t_q.push_back($time);
      in_valid = 1'b1;
      in_tag.addr = addr_t'(n);
      in_tag.last = (n == NT - 1);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    checks++;
    if (seen[0] == 0 || seen[128] == 0 || seen[255] == 0) begin
      failures++;
      $display("FAIL: class coverage none=%0d weak=%0d strong=%0d", seen[0], seen[128], seen[255]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
