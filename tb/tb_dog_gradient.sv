// tb_dog_gradient: self-checking testbench for dog_gradient.
//
// Random seven-pixel lines plus the extreme ramps: the gradient must match
// the reference sum of pixel times weight (multiplications, not shifts)
// divided by 10000, and for a dark-to-bright step it must be positive.
module tb_dog_gradient;
  import vein_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [6:0][7:0]   pix;
  logic signed [9:0] grad;

  dog_gradient dut (.pix, .grad);

  task automatic check(int p[7]);
    int e;
    foreach (p[i]) pix[i] = 8'(p[i]);
    #1;
    e = dog_ref(p);
    checks++;
    if (int'(grad) != e) begin
      failures++;
      $display("FAIL: got %0d exp %0d", grad, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p[7];
    check('{0, 0, 0, 0, 255, 255, 255});
    checks++;
    if (grad <= 0) begin failures++; $display("FAIL: step sign"); end
    check('{255, 255, 255, 0, 0, 0, 0});
    check('{0, 0, 0, 128, 255, 255, 255});
    check('{255, 255, 255, 255, 255, 255, 255});
    for (int n = 0; n < 20000; n++) begin
      foreach (p[i]) p[i] = $urandom_range(0, 255);
      check(p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
