// tb_rbrief_unit: streams a smooth random image into the rBRIEF unit, stops
// at several window positions and checks the orientation (sin, cos), the
// 256-bit descriptor and the 136-cycle latency against a software model
// (moments over the radius-15 disc, integer square root, Q1.14 division,
// rotated pattern, intensity comparisons). The last stops are in a flat
// region, where the moments vanish and the angle must default to zero.
module tb_rbrief_unit;
  import orb_pkg::*;
  localparam int MAXW = 48, W = 40, H = 100, LAT = 136;
  logic clk = 0, rst_n = 0, push = 0, start = 0, busy, done;
  pix_t fpix = 0;
  desc_t desc;
  logic signed [15:0] sin_q, cos_q;
  int checks = 0, failures = 0, stops = 0, flat_stops = 0;
  int img [H][W];

  rbrief_unit #(.MAXW(MAXW)) dut (.clk, .rst_n, .push, .fpix, .width(16'(W)), .start,
    .busy, .done, .desc, .sin_q, .cos_q);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint isqrt(longint v);
    longint r;
    r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic int rnd14(int v);
    int t;
    t = (v + 8192) >>> 14;
    if (t > 18) t = 18;
    if (t < -18) t = -18;
    return t;
  endfunction

  task automatic reference(input int cy, input int cx, output int s, output int c, output desc_t d);
    longint m10, m01, r;
    int x1, y1, x2, y2;
    m10 = 0; m01 = 0;
    for (int dy = -15; dy <= 15; dy++)
      for (int dx = -15; dx <= 15; dx++)
        if (dx * dx + dy * dy <= 225) begin
          m10 += dx * img[cy + dy][cx + dx];
          m01 += dy * img[cy + dy][cx + dx];
        end
    r = isqrt(m10 * m10 + m01 * m01);
    if (r == 0) begin s = 0; c = 16384; end
    else begin
      s = int'((m01 * 16384) / r);
      c = int'((m10 * 16384) / r);
    end
    for (int i = 0; i < 256; i++) begin
      x1 = brief_coord(i, 0); y1 = brief_coord(i, 1);
      x2 = brief_coord(i, 2); y2 = brief_coord(i, 3);
      d[i] = img[cy + rnd14(x1 * s + y1 * c)][cx + rnd14(x1 * c - y1 * s)]
           < img[cy + rnd14(x2 * s + y2 * c)][cx + rnd14(x2 * c - y2 * s)];
    end
  endtask

  initial begin
    int n, idx, cy, cx, rs, rc, lat;
    desc_t rd;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = (y < 60) ? (128 + 60 * (x - 20) * (y % 7 - 3) / 60 + ($urandom % 50)) % 256 : 90;
    repeat (2) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < H * W) begin
      @(negedge clk);
      push = 1;
      fpix = pix_t'(img[n / W][n % W]);
      @(posedge clk);
      #1 push = 0;
      n++;
      idx = n - 1 - 18 * W - 18;   // window centre
      if (idx >= 0 && ($urandom % 6 == 0 || (idx / W > 80 && idx % W == 20))) begin
        cy = idx / W; cx = idx % W;
        if (cy >= 18 && cx >= 18 && cx <= W - 19) begin
          @(negedge clk);
          start = 1;
          @(posedge clk);
          #1 start = 0;
          lat = 0;
          while (!done) begin
            @(posedge clk);
            #1 lat++;
          end
          reference(cy, cx, rs, rc, rd);
          stops++;
          if (cy - 15 >= 60) flat_stops++;
          checks += 3;
          if (int'(sin_q) != rs || int'(cos_q) != rc) begin
            failures++;
            $display("FAIL (%0d,%0d) sin/cos %0d/%0d expected %0d/%0d", cy, cx, sin_q, cos_q, rs, rc);
          end
          if (desc !== rd) begin
            failures++;
            $display("FAIL (%0d,%0d) descriptor %h expected %h", cy, cx, desc, rd);
          end
          if (lat != LAT) begin
            failures++;
            $display("FAIL latency %0d expected %0d", lat, LAT);
          end
        end
      end
    end
    $display("stops %0d, flat %0d", stops, flat_stops);
    if (stops < 10 || flat_stops == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
