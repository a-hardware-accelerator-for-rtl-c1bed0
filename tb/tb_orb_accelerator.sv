// tb_orb_accelerator: end-to-end test of the ORB accelerator at its default
// parameters: three 60 x 40 images (102 x 82 with border): one with every
// kind of dynamic-threshold tile, one of random spots and one without
// corners (one pixel per cycle), checked record for
// record against a software model (see orb_tb_core).
module tb_orb_accelerator;
  orb_tb_core #(.EW(60), .EH(40), .FRAMES(3)) core ();
endmodule
