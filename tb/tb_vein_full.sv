// tb_vein_full: end-to-end test of the preprocessing core on a 320 x 240
// synthetic finger image, the image size of the reference capture set-up,
// with the core at its default parameters (see vein_core_run).
module tb_vein_full;
  logic fin;
  // The shared body reports the result and ends the simulation itself.
  initial begin
    wait (fin);
    $finish;
  end
  vein_core_run #(.W(320), .H(240)) run (.done_o(fin));
endmodule
