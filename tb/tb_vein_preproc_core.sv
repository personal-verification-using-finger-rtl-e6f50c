// tb_vein_preproc_core: end-to-end test of the preprocessing core on a
// 64 x 48 synthetic finger image (see vein_core_run for what is checked).
module tb_vein_preproc_core;
  logic fin;
  // The shared body reports the result and ends the simulation itself.
  initial begin
    wait (fin);
    $finish;
  end
  vein_core_run #(.W(64), .H(48)) run (.done_o(fin));
endmodule
