// tb_vein_big: single-module runs of the preprocessing core on a 512 x 256
// image, 131,072 pixels, the largest image a single module may process
// (half of the 2^18-word buffer). The whole chain needs three image regions
// and cannot take an image this large, so it is not run (see vein_core_run).
module tb_vein_big;
  logic fin;
  // The shared body reports the result and ends the simulation itself.
  initial begin
    wait (fin);
    $finish;
  end
  vein_core_run #(.W(512), .H(256), .CHAIN(1'b0)) run (.done_o(fin));
endmodule
