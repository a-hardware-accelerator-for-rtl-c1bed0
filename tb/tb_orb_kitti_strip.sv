// tb_orb_kitti_strip: one full-height strip of a KITTI odometry frame
// (1241 x 376 grayscale) as the host would cut it for the default 210-pixel
// buffers: 150 x 376 image pixels, 192 x 418 with border, streamed once
// through the accelerator at its default parameters and checked record for
// record against the software model of orb_tb_core. The image content is
// synthetic (tile kinds chosen to exercise every mechanism), not camera data.
module tb_orb_kitti_strip;
  orb_tb_core #(.EW(150), .EH(376), .FRAMES(1), .WATCHDOG(20_000_000)) core ();
endmodule
