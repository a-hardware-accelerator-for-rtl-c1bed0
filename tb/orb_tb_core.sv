// orb_tb_core: self-checking end-to-end bench for orb_accelerator at its
// default parameters (210-pixel lines, 8 rBRIEF copies, 7 tile buffers of
// 32), for an EW x EH image streamed FRAMES times. The wrappers
// tb_orb_accelerator and tb_orb_kitti_strip choose the sizes.
//
// Each image is padded by 21 pixels on each side with BORDER_REFLECT_101 (as
// the host would) and streamed with random input gaps and random output
// back-pressure. A software model computes, from the same padded image, the
// Gauss-filtered image, FAST scores at both thresholds, 3x3 NMS, the
// dynamic-threshold decision per 30x30 tile in raster order, store-buffer
// overflow, and every descriptor (moments, square root, Q1.14 sin/cos,
// rotated pattern); the accelerator's output must match it record for record
// and in order.
//
// Odd frames cycle their 30x30 tiles through four kinds: strong noise (many
// IniThr corners, buffer overflow), weak spots (MinThr-only corners kept),
// weak spots followed by one strong corner (MinThr descriptors computed then
// discarded) and flat. Frames 2, 5, ... are random spots of mixed contrast;
// frames 3, 6, ... hold no corner and check the one-pixel-per-cycle rate.
// Counted mechanisms: input stall, rBRIEF runs, dirty-tile discards,
// overflow drops, band flushes, end-of-image drain push, output
// back-pressure, MinThr-only tiles. Each must occur at least once (the
// rate check only when a cornerless frame is streamed).
module orb_tb_core
  import orb_pkg::*;
#(
  parameter int EW      = 60,
  parameter int EH      = 40,
  parameter int FRAMES  = 2,
  parameter int WATCHDOG = 3_000_000
) ();
  localparam int B = BORDER;
  localparam int W = EW + 2 * B, H = EH + 2 * B;
  localparam int INI = 20, MIN = 7, DEPTH = 32, NTT = 7;

  logic clk = 0, rst_n = 0;
  logic in_val = 0, in_rdy, out_val, out_rdy = 0, frame_done;
  pix_t in_pix = 0;
  desc_t out_desc;
  coord_t out_x, out_y;
  logic [31:0] drop_count;

  orb_accelerator dut (
    .clk, .rst_n, .in_val, .in_rdy, .in_pix,
    .width(coord_t'(W)), .height(coord_t'(H)), .ini_thr(pix_t'(INI)), .min_thr(pix_t'(MIN)),
    .out_val, .out_rdy, .out_desc, .out_x, .out_y, .frame_done, .drop_count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img [H][W];
  int F [H][W];
  int SI [H][W];
  int SM [H][W];
  int e [EH][EW];

  typedef struct { int x; int y; logic ini; logic min; desc_t d; } rec_t;
  rec_t exp_q [$];
  rec_t got_q [$];
  int exp_drops = 0, exp_discards = 0, exp_minonly_out = 0, exp_desc = 0;

  // mechanism counters
  int busy_cycles, frame_cycles, n_flat = 0;
  int n_stall = 0, n_rbrief = 0, n_flush = 0, n_drain = 0, n_backpress = 0, n_wr = 0, n_out = 0;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired: state %0d in %0d,%0d c %0d,%0d pend %b drain %b sb_busy %b rb_busy %b outs %0d", dut.state, dut.in_row, dut.in_col, dut.crow, dut.ccol, dut.pending, dut.drain_req, dut.sb_busy, dut.rb_busy, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_val && !in_rdy) n_stall++;
    if (dut.rb_start) n_rbrief++;
    if (dut.sb_flush) n_flush++;
    if (dut.drain_push) n_drain++;
    if (dut.sb_wr) n_wr++;
    if (out_val && !out_rdy) n_backpress++;
    if (out_val && out_rdy) begin
      rec_t r;
      r.x = int'(out_x); r.y = int'(out_y); r.d = out_desc; r.ini = 0; r.min = 0;
      got_q.push_back(r);
      n_out++;
    end
    out_rdy <= ($urandom % 4) != 0;
  end

  // ---------------------------------------------------------------- model
  function automatic int refl(int i, int n);
    if (i < 0) return -i;
    if (i >= n) return 2 * n - 2 - i;
    return i;
  endfunction

  int cdx [16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
  int cdy [16] = '{3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1, 0, 1, 2, 3};

  function automatic int fscore(int y, int x, int t);
    int c, rb, rd, bb, bd, sad, p;
    c = img[y][x];
    sad = 0; rb = 0; rd = 0; bb = 0; bd = 0;
    for (int i = 0; i < 32; i++) begin
      p = img[y + cdy[i % 16]][x + cdx[i % 16]];
      if (i < 16) sad += (p > c) ? p - c : c - p;
      rb = (p > c + t) ? rb + 1 : 0;
      rd = (p < c - t) ? rd + 1 : 0;
      if (rb > bb) bb = rb;
      if (rd > bd) bd = rd;
    end
    return (bb >= 9 || bd >= 9) ? sad : 0;
  endfunction

  function automatic logic nms(int y, int x, logic ini);
    int c;
    c = ini ? SI[y][x] : SM[y][x];
    if (c == 0) return 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if ((dy != 0 || dx != 0) && (ini ? SI[y + dy][x + dx] : SM[y + dy][x + dx]) >= c) return 0;
    return 1;
  endfunction

  function automatic int rnd14(int v);
    int t;
    t = (v + 8192) >>> 14;
    return (t > 18) ? 18 : (t < -18) ? -18 : t;
  endfunction

  function automatic desc_t descriptor(int cy, int cx);
    longint m10, m01, r;
    int s, c;
    desc_t d;
    m10 = 0; m01 = 0;
    for (int dy = -15; dy <= 15; dy++)
      for (int dx = -15; dx <= 15; dx++)
        if (dx * dx + dy * dy <= 225) begin
          m10 += dx * F[cy + dy][cx + dx];
          m01 += dy * F[cy + dy][cx + dx];
        end
    r = 0;
    while ((r + 1) * (r + 1) <= m10 * m10 + m01 * m01) r++;
    if (r == 0) begin s = 0; c = 16384; end
    else begin s = int'((m01 * 16384) / r); c = int'((m10 * 16384) / r); end
    for (int i = 0; i < 256; i++) begin
      int x1, y1, x2, y2;
      x1 = brief_coord(i, 0); y1 = brief_coord(i, 1);
      x2 = brief_coord(i, 2); y2 = brief_coord(i, 3);
      d[i] = F[cy + rnd14(x1 * s + y1 * c)][cx + rnd14(x1 * c - y1 * s)]
           < F[cy + rnd14(x2 * s + y2 * c)][cx + rnd14(x2 * c - y2 * s)];
    end
    return d;
  endfunction

  task automatic build_model();
    int kr [4][4];
    kr[0] = '{12, 10, 7, 4}; kr[1] = '{10, 9, 6, 3}; kr[2] = '{7, 6, 4, 2}; kr[3] = '{4, 3, 2, 1};
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        F[y][x] = 0; SI[y][x] = 0; SM[y][x] = 0;
        if (y >= 3 && y < H - 3 && x >= 3 && x < W - 3) begin
          int acc;
          acc = 0;
          for (int dy = -3; dy <= 3; dy++)
            for (int dx = -3; dx <= 3; dx++)
              acc += kr[(dy < 0) ? -dy : dy][(dx < 0) ? -dx : dx] * img[y + dy][x + dx];
          F[y][x] = (acc + 128) / 256;
          SI[y][x] = fscore(y, x, INI);
          SM[y][x] = fscore(y, x, MIN);
        end
      end
    // bands of 30 rows, tiles of 30 columns, raster order inside a band
    for (int b0 = 0; b0 < EH; b0 += 30) begin
      rec_t buf_q [NTT][$];
      logic dirty [NTT];
      for (int t = 0; t < NTT; t++) dirty[t] = 0;
      for (int ey = b0; ey < b0 + 30 && ey < EH; ey++)
        for (int ex = 0; ex < EW; ex++) begin
          logic fi, fm;
          int t;
          t  = ex / 30;
          fi = nms(ey + B, ex + B, 1);
          fm = nms(ey + B, ex + B, 0);
          if (fi || (fm && !dirty[t])) begin
            rec_t r;
            r.x = ex; r.y = ey; r.ini = fi; r.min = fm;
            r.d = descriptor(ey + B, ex + B);
            exp_desc++;
            if (buf_q[t].size() < DEPTH) buf_q[t].push_back(r);
            else exp_drops++;
            if (fi) dirty[t] = 1;
          end
        end
      for (int t = 0; t < NTT; t++)
        foreach (buf_q[t][k]) begin
          if (dirty[t] ? buf_q[t][k].ini : buf_q[t][k].min) begin
            exp_q.push_back(buf_q[t][k]);
            if (!dirty[t]) exp_minonly_out++;
          end else exp_discards++;
        end
    end
  endtask

  // unpadded image content: the kind of each 30x30 tile cycles through
  // strong noise, weak spots, weak spots with one late strong corner, flat
  function automatic int pattern1(int ey, int ex);
    int ty, tx;
    ty = ey / 30; tx = ex / 30;
    case ((tx + 3 * ty) % 4)
      0: return ($urandom % 3 == 0) ? $urandom % 256 : 120;
      1: return ($urandom % 8 == 0) ? 132 : 120;
      2: return (ey % 30 == 7 && ex % 30 == 15) ? 200 : ($urandom % 8 == 0 && ey % 30 < 4) ? 110 : 120;
      default: return 90;
    endcase
  endfunction

  function automatic int pattern2(int ey, int ex);
    int r;
    r = $urandom % 12;
    return (r == 0) ? 160 : (r == 1) ? 130 : 118 + ey % 3;
  endfunction

  task automatic run_frame(int which);
    int n;
    for (int y = 0; y < EH; y++)
      for (int x = 0; x < EW; x++) e[y][x] = (which == 1) ? pattern1(y, x) : (which == 2) ? pattern2(y, x) : 90 + (x + y) % 2;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y][x] = e[refl(y - B, EH)][refl(x - B, EW)];
    exp_q.delete();
    got_q.delete();
    build_model();
    n = 0;
    busy_cycles = 0;
    frame_cycles = 0;
    while (n < W * H) begin
      @(negedge clk);
      in_val = ($urandom % 10) != 0;
      in_pix = pix_t'(img[n / W][n % W]);
      @(posedge clk);
      if (in_val && in_rdy) n++;
      if (!in_rdy) busy_cycles++;
      frame_cycles++;
      #1 in_val = 0;
    end
    while (!frame_done) begin
      @(posedge clk);
      frame_cycles++;
    end
    $display("frame %0d: %0d pixels in %0d cycles, input refused in %0d cycles", which, W * H, frame_cycles, busy_cycles);
    if (which == 3) begin
      // no corners: one pixel per cycle, stalls only for the band flushes
      checks++;
      n_flat++;
      if (exp_q.size() != 0 || busy_cycles > ((EH + 29) / 30) * (NTT + 4) + 4) begin
        failures++;
        $display("FAIL flat image: %0d refused cycles, %0d expected records", busy_cycles, exp_q.size());
      end
    end
    repeat (2) @(posedge clk);
    checks++;
    if (got_q.size() != exp_q.size()) begin
      failures++;
      $display("FAIL frame %0d: %0d records, expected %0d", which, got_q.size(), exp_q.size());
    end
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
      checks++;
      if (got_q[i].x != exp_q[i].x || got_q[i].y != exp_q[i].y || got_q[i].d !== exp_q[i].d) begin
        failures++;
        if (failures < 6)
          $display("FAIL frame %0d record %0d: (%0d,%0d) expected (%0d,%0d)%s", which, i, got_q[i].x,
                   got_q[i].y, exp_q[i].x, exp_q[i].y, (got_q[i].d !== exp_q[i].d) ? " descriptor differs" : "");
      end
    end
    $display("frame %0d: %0d records out, %0d descriptors computed (model %0d)", which, got_q.size(), n_wr, exp_desc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 1; f <= FRAMES; f++) run_frame((f - 1) % 3 + 1);
    checks += 2;
    if (int'(drop_count) != exp_drops) begin
      failures++;
      $display("FAIL drop_count %0d expected %0d", drop_count, exp_drops);
    end
    if (n_rbrief != exp_desc) begin
      failures++;
      $display("FAIL rBRIEF runs %0d expected %0d", n_rbrief, exp_desc);
    end
    $display("mechanisms: stall %0d, rbrief %0d, discard %0d, overflow %0d, flush %0d, drain %0d, backpressure %0d, minthr-only kept %0d",
             n_stall, n_rbrief, exp_discards, exp_drops, n_flush, n_drain, n_backpress, exp_minonly_out);
    if (n_stall == 0)         begin failures++; $display("FAIL no stall"); end
    if (n_rbrief == 0)        begin failures++; $display("FAIL no rBRIEF run"); end
    if (exp_discards == 0 || n_wr - int'(drop_count) == n_out) begin failures++; $display("FAIL no discard"); end
    if (exp_drops == 0)       begin failures++; $display("FAIL no overflow"); end
    if (n_flush < FRAMES * ((EH + 29) / 30))          begin failures++; $display("FAIL too few band flushes"); end
    if (n_drain != FRAMES)         begin failures++; $display("FAIL drain pushes %0d", n_drain); end
    if (n_backpress == 0)     begin failures++; $display("FAIL no back-pressure"); end
    if (exp_minonly_out == 0) begin failures++; $display("FAIL no MinThr-only tile"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
