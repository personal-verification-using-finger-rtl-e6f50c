// tb_div10000: self-checking testbench for div10000.
//
// Exhaustive over the range the gradient unit produces (|x| <= 926415), in
// steps, plus random values: the result must equal x*13421/2^27 rounded
// toward zero (computed with a 64-bit multiply) and lie within 1.01 of x/10000 (truncation plus the 5e-5 relative error).
module tb_div10000;
  int checks = 0;
  int failures = 0;

  logic signed [23:0] din;
  logic signed [23:0] dout;

  div10000 #(.IN_W(24)) dut (.din, .dout);

  task automatic check(int v);
    longint m, q;
    real r;
    din = 24'(v);
    #1;
    m = (v < 0) ? -v : v;
    q = (m * 13421) >> 27;
    if (v < 0) q = -q;
    r = real'(v) / 10000.0;
    checks++;
    if (int'(dout) != int'(q) || (real'(dout) - r) > 1.01 || (r - real'(dout)) > 1.01) begin
      failures++;
      $display("FAIL: %0d -> %0d exp %0d", v, dout, q);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -926415; v <= 926415; v += 97) check(v);
    for (int i = 0; i < 2000; i++) check($urandom_range(0, 1852830) - 926415);
    check(10000); check(-10000); check(9999); check(-9999); check(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
