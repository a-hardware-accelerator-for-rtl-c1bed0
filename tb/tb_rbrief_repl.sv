// tb_rbrief_repl: the rBRIEF unit at replication factors 1, 2, 4, 16 and 32
// (the main configuration, 8, is covered by tb_rbrief_unit). All five units
// share one filtered-pixel stream and one start pulse. At each stop every
// unit must give the orientation and descriptor of the same software model,
// and take 31 * ceil(31 / (2 * REPL)) + 42 + 256 / REPL cycles: the moment
// pass reads 2 * REPL disc pixels per cycle and the BRIEF phase evaluates
// REPL pairs per cycle, while square root and division do not depend on
// REPL. This is the trade-off the replication factor controls.
module tb_rbrief_repl;
  import orb_pkg::*;
  localparam int MAXW = 48, W = 40, H = 70, NU = 5;
  localparam int RS [NU] = '{1, 2, 4, 16, 32};
  logic clk = 0, rst_n = 0, push = 0, start = 0;
  pix_t fpix = 0;
  logic  busy [NU], done [NU];
  desc_t desc [NU];
  logic signed [15:0] sin_q [NU], cos_q [NU];
  int lat [NU];
  int checks = 0, failures = 0, stops = 0;
  int img [H][W];

  for (genvar u = 0; u < NU; u++) begin : g_unit
    rbrief_unit #(.MAXW(MAXW), .REPL(RS[u])) dut (.clk, .rst_n, .push, .fpix, .width(16'(W)),
      .start, .busy(busy[u]), .done(done[u]), .desc(desc[u]), .sin_q(sin_q[u]), .cos_q(cos_q[u]));
    always @(posedge clk) begin
      if (start) lat[u] <= 0;
      else if (busy[u]) lat[u] <= lat[u] + 1;
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
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

  function automatic bit all_idle();
    for (int u = 0; u < NU; u++) if (busy[u]) return 0;
    return 1;
  endfunction

  initial begin
    int n, idx, cy, cx, rs, rc, want;
    desc_t rd;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = (128 + 50 * (x - 20) * (y % 5 - 2) / 40 + 3 * y + ($urandom % 60)) % 256;
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
      if (idx >= 0 && $urandom % 3 == 0) begin
        cy = idx / W; cx = idx % W;
        if (cy >= 18 && cx >= 18 && cx <= W - 19) begin
          @(negedge clk);
          start = 1;
          @(posedge clk);
          #1 start = 0;
          while (!all_idle()) @(posedge clk);
          #1;
          reference(cy, cx, rs, rc, rd);
          stops++;
          for (int u = 0; u < NU; u++) begin
            want = 31 * ((31 + 2 * RS[u] - 1) / (2 * RS[u])) + 42 + 256 / RS[u];
            checks += 3;
            if (int'(sin_q[u]) != rs || int'(cos_q[u]) != rc) begin
              failures++;
              $display("FAIL REPL %0d (%0d,%0d) sin/cos %0d/%0d expected %0d/%0d",
                       RS[u], cy, cx, sin_q[u], cos_q[u], rs, rc);
            end
            if (desc[u] !== rd) begin
              failures++;
              $display("FAIL REPL %0d (%0d,%0d) descriptor differs", RS[u], cy, cx);
            end
            if (lat[u] != want) begin
              failures++;
              $display("FAIL REPL %0d latency %0d expected %0d", RS[u], lat[u], want);
            end
          end
        end
      end
    end
    $display("stops %0d; latencies %0d %0d %0d %0d %0d", stops, lat[0], lat[1], lat[2], lat[3], lat[4]);
    if (stops < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
