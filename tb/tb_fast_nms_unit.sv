// tb_fast_nms_unit: streams an image of random grey blocks and isolated
// spots into the FAST+NMS unit and checks, at every push, the two FAST
// scores of the FAST centre and the two NMS decisions of the NMS centre
// against a direct software model (9-of-16 arc test, sum of absolute
// differences, strict 3x3 maximum).
module tb_fast_nms_unit;
  import orb_pkg::*;
  localparam int MAXW = 48, W = 40, H = 30;
  localparam int INI = 20, MIN = 7;
  logic clk = 0, rst_n = 0, push = 0;
  pix_t pix = 0;
  logic [SCORE_W-1:0] score_ini, score_min;
  logic ini_feat, min_feat;
  int checks = 0, failures = 0, n_ini = 0, n_min = 0, n_minonly = 0;
  int img [H][W];
  int si [H][W];
  int sm [H][W];

  fast_nms_unit #(.MAXW(MAXW)) dut (.clk, .rst_n, .push, .pix, .width(16'(W)),
    .ini_thr(8'(INI)), .min_thr(8'(MIN)), .score_ini, .score_min, .ini_feat, .min_feat);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // circle in the order of the FAST literature (independent of orb_pkg)
  int cdx [16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
  int cdy [16] = '{3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1, 0, 1, 2, 3};

  function automatic int score(int y, int x, int t);
    int c, run_b, run_d, best_b, best_d, sad, p;
    c = img[y][x];
    sad = 0; run_b = 0; run_d = 0; best_b = 0; best_d = 0;
    for (int i = 0; i < 32; i++) begin
      p = img[y + cdy[i % 16]][x + cdx[i % 16]];
      if (i < 16) sad += (p > c) ? p - c : c - p;
      run_b = (p > c + t) ? run_b + 1 : 0;
      run_d = (p < c - t) ? run_d + 1 : 0;
      if (run_b > best_b) best_b = run_b;
      if (run_d > best_d) best_d = run_d;
    end
    return (best_b >= 9 || best_d >= 9) ? sad : 0;
  endfunction

  function automatic logic nms(int y, int x, logic ini);
    int c;
    c = ini ? si[y][x] : sm[y][x];
    if (c == 0) return 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if (dy != 0 || dx != 0)
          if ((ini ? si[y + dy][x + dx] : sm[y + dy][x + dx]) >= c) return 0;
    return 1;
  endfunction

  initial begin
    int n, idx, y, x;
    logic ei, em;
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++) begin
        img[yy][xx] = 100 + ((yy / 5 + xx / 6) % 3) * 9;
        if ($urandom % 9 == 0) img[yy][xx] = 100 + $urandom % 60;
      end
    for (int yy = 3; yy < H - 3; yy++)
      for (int xx = 3; xx < W - 3; xx++) begin
        si[yy][xx] = score(yy, xx, INI);
        sm[yy][xx] = score(yy, xx, MIN);
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < H * W) begin
      @(negedge clk);
      push = ($urandom % 4) != 0;
      pix  = pix_t'(img[n / W][n % W]);
      @(posedge clk);
      #1;
      if (push) begin
        n++;
        push = 0;
        idx = n - 1 - 3 * W - 3;              // FAST centre
        if (idx >= 0) begin
          y = idx / W; x = idx % W;
          if (y >= 3 && x >= 3 && x <= W - 4) begin
            checks += 2;
            if (int'(score_ini) != si[y][x] || int'(score_min) != sm[y][x]) begin
              failures++;
              $display("FAIL score (%0d,%0d) %0d/%0d expected %0d/%0d", y, x, score_ini, score_min, si[y][x], sm[y][x]);
            end
          end
        end
        idx = n - 4 * W - 6;                  // NMS centre
        if (idx >= 0) begin
          y = idx / W; x = idx % W;
          if (y >= 4 && y <= H - 5 && x >= 4 && x <= W - 5) begin
            ei = nms(y, x, 1);
            em = nms(y, x, 0);
            n_ini += int'(ei);
            n_min += int'(em);
            n_minonly += int'(em && !ei);
            checks += 2;
            if (ini_feat !== ei || min_feat !== em) begin
              failures++;
              $display("FAIL nms (%0d,%0d) %b%b expected %b%b", y, x, ini_feat, min_feat, ei, em);
            end
          end
        end
      end
    end
    $display("features: ini %0d, min %0d, min only %0d", n_ini, n_min, n_minonly);
    if (n_ini == 0 || n_minonly == 0) begin
      failures++;
      $display("FAIL test image produced too few corners");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
