// tb_gauss5: self-checking testbench for gauss5.
//
// Random 5x5 windows, including all-255, against the weighted sum divided by 273.
// Each window is given a tag with a running address; the monitor checks the
// output pixel against the reference model, the tag, and that the result
// appears exactly 1 cycle(s) after the window.
module tb_gauss5;
  import vein_pkg::*;
  import vein_ref_pkg::*;

  localparam int NW  = 25;
  localparam int LAT = 1;
  localparam int NT  = 3000;

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

  gauss5 dut (.clk, .rst_n, .in_valid, .in_tag, .win, .out_valid, .out_tag, .out_pix);

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
      begin int m = $urandom_range(0, 9); foreach (w[i]) w[i] = (m == 0) ? 255 : $urandom_range(0, 255); end
      foreach (w[i]) win[i] = 8'(w[i]);
      wq.delete();
      foreach (w[i]) wq.push_back(w[i]);
      e = gauss_ref(w);
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

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
