// gauss_unit: 7x7 Gaussian filter (sigma = 2) on a raster pixel stream.
//
// A 7x7 sliding window holds the neighbourhood; each of the 49 pixels is
// multiplied by its kernel weight (orb_pkg::gauss_coef, the real kernel
// times 256, i.e. scaled by 16 and kept in Q8.4) and an adder tree sums the
// products. The sum is rounded to the nearest integer after dividing by
// 256: filt = (sum + 128) >> 8.
//
// filt and raw are combinational from the registered window and belong to
// the window centre, 3 * width + 3 pushes behind the input. exit_pix is the
// raw pixel that left the window on the last push.
// Kernel, window size and Q8.4 coefficients follow the document. Because
// the rounded integer weights sum to 240 rather than 256, the output is
// about 6 % darker than an exactly normalised filter; this is kept as the
// document's fixed-point choice. Rounding mode is this design's choice.
module gauss_unit
  import orb_pkg::*;
#(
  parameter int MAXW = 210,
  parameter int WW   = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  pix_t          pix,
  input  logic [WW-1:0] width,
  output pix_t          filt,
  output pix_t          raw,
  output pix_t          exit_pix
);

  localparam int GK = 2 * GAUSS_R + 1;

  logic [GK-1:0][GK-1:0][PIX_W-1:0] gwin;
  logic [15:0] acc;

  sliding_window #(.DW(PIX_W), .K(GK), .MAXW(MAXW), .WW(WW)) u_win (
    .clk, .rst_n, .push, .din(pix), .width, .win(gwin), .exit_pix
  );

  always_comb begin
    acc = '0;
    for (int r = 0; r < GK; r++)
      for (int c = 0; c < GK; c++)
        acc += 16'(gauss_coef(r - GAUSS_R, c - GAUSS_R)) * 16'(gwin[r][c]);
  end

  assign filt = pix_t'((acc + 16'd128) >> 8);
  assign raw  = gwin[GAUSS_R][GAUSS_R];

endmodule
