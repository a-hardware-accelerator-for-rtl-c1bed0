// fast_nms_unit: FAST corner detection at two thresholds plus 3x3
// non-maximal suppression, one pixel per push.
//
// A 7x7 sliding window over the raw pixels gives the centre pixel and its 16
// Bresenham-circle neighbours. Each neighbour is compared with the centre
// against both run-time thresholds (IniThr and MinThr), giving a brighter
// and a darker 16-bit string per threshold; fast_segment_test finds 9
// consecutive ones. The corner score is the sum of absolute differences
// between the centre and the 16 circle pixels. score_ini / score_min are the
// score where the pixel is an IniThr / MinThr corner and 0 elsewhere.
//
// On every push the pair of scores of the current FAST centre is pushed into
// a 3x3 sliding window. ini_feat (min_feat) is 1 when the NMS centre has a
// non-zero IniThr (MinThr) score that is strictly greater than the same
// score of all 8 neighbours. Both are combinational from the registered
// windows. The FAST centre is 3 * width + 3 pushes behind the newest pixel;
// its scores enter the 3x3 window on the next push, so the NMS centre is
// 4 * width + 5 pushes behind the newest pixel.
//
// Follows the document: two windows (7x7 pixels, 3x3 scores), parallel
// detection with both thresholds, 9-of-16 AND tree, 3x3 NMS comparing the 8
// neighbours. The score (sum of absolute differences), strict comparison on
// ties and a separate NMS for each threshold are this design's choices.
module fast_nms_unit
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
  input  pix_t          ini_thr,
  input  pix_t          min_thr,
  // FAST centre of the current 7x7 window (for observation and test)
  output logic [SCORE_W-1:0] score_ini,
  output logic [SCORE_W-1:0] score_min,
  // NMS centre decision
  output logic          ini_feat,
  output logic          min_feat
);

  localparam int FK = 2 * FAST_R + 1;

  logic [FK-1:0][FK-1:0][PIX_W-1:0] fwin;
  logic [2:0][2:0][2*SCORE_W-1:0]   nwin;
  pix_t                             unused_f, center;
  logic [2*SCORE_W-1:0]             unused_n;

  sliding_window #(.DW(PIX_W), .K(FK), .MAXW(MAXW), .WW(WW)) u_fwin (
    .clk, .rst_n, .push, .din(pix), .width, .win(fwin), .exit_pix(unused_f)
  );

  logic [15:0] br_ini, dk_ini, br_min, dk_min;
  logic        c_ini, c_min, c_ini_b, c_ini_d, c_min_b, c_min_d;
  logic [SCORE_W-1:0] sad;

  always_comb begin
    int p, c;
    center = fwin[FAST_R][FAST_R];
    c   = int'(center);
    sad = '0;
    for (int i = 0; i < 16; i++) begin
      p = int'(fwin[FAST_R + fast_circle(i, 1)][FAST_R + fast_circle(i, 0)]);
      br_ini[i] = p > c + int'(ini_thr);
      dk_ini[i] = p < c - int'(ini_thr);
      br_min[i] = p > c + int'(min_thr);
      dk_min[i] = p < c - int'(min_thr);
      sad += SCORE_W'((p > c) ? p - c : c - p);
    end
  end

  fast_segment_test u_st0 (.bits(br_ini), .hit(c_ini_b));
  fast_segment_test u_st1 (.bits(dk_ini), .hit(c_ini_d));
  fast_segment_test u_st2 (.bits(br_min), .hit(c_min_b));
  fast_segment_test u_st3 (.bits(dk_min), .hit(c_min_d));

  assign c_ini     = c_ini_b | c_ini_d;
  assign c_min     = c_min_b | c_min_d;
  assign score_ini = c_ini ? sad : '0;
  assign score_min = c_min ? sad : '0;

  sliding_window #(.DW(2 * SCORE_W), .K(3), .MAXW(MAXW), .WW(WW)) u_nwin (
    .clk, .rst_n, .push, .din({score_ini, score_min}), .width, .win(nwin),
    .exit_pix(unused_n)
  );

  always_comb begin
    logic [SCORE_W-1:0] ci, cm;
    ci = nwin[1][1][2*SCORE_W-1:SCORE_W];
    cm = nwin[1][1][SCORE_W-1:0];
    ini_feat = (ci != '0);
    min_feat = (cm != '0);
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (!(r == 1 && c == 1)) begin
          if (nwin[r][c][2*SCORE_W-1:SCORE_W] >= ci) ini_feat = 1'b0;
          if (nwin[r][c][SCORE_W-1:0]         >= cm) min_feat = 1'b0;
        end
  end

endmodule
