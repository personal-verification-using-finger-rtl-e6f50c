// tb_grad_mag_dir: self-checking testbench for grad_mag_dir.
//
// Exhaustive over dx, dy in -92..92 (the gradient range): the direction class
// must match the arctangent of dy/dx quantised by the table of angle ranges,
// the magnitude must match max(a - a/8 + b/2, a), and it must lie within
// 13% (plus one for rounding) of the true Euclidean magnitude.
module tb_grad_mag_dir;
  import vein_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int cls[4];

  logic signed [9:0] dx, dy;
  logic [9:0]        mag;
  logic [1:0]        dir;

  grad_mag_dir dut (.dx, .dy, .mag, .dir);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real tru;
    for (int a = -92; a <= 92; a++)
      for (int b = -92; b <= 92; b++) begin
        dx = 10'(a); dy = 10'(b);
        #1;
        tru = $sqrt(real'(a * a + b * b));
        checks++;
        if (int'(dir) != dir_ref(a, b) || int'(mag) != mag_ref(a, b) ||
            real'(mag) > tru * 1.13 + 1.0 || real'(mag) < tru * 0.87 - 1.0) begin
          failures++;
          if (failures < 10)
            $display("FAIL: dx %0d dy %0d mag %0d (exp %0d) dir %0d (exp %0d)", a, b, mag, mag_ref(a, b), dir, dir_ref(a, b));
        end
        cls[dir]++;
      end
    checks++;
    if (cls[0] == 0 || cls[1] == 0 || cls[2] == 0 || cls[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
