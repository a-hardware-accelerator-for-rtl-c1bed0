// tb_gauss_unit: streams a random image (with random gaps) through the
// Gauss unit and checks every filtered and raw centre pixel whose 7x7
// neighbourhood lies inside the image. The reference kernel is derived here
// from the real sigma = 2 coefficients: round(k * 16 * 16) in Q8.4.
module tb_gauss_unit;
  import orb_pkg::*;
  localparam int MAXW = 32, W = 23, H = 14;
  logic clk = 0, rst_n = 0, push = 0;
  pix_t pix = 0, filt, raw, exit_pix;
  int checks = 0, failures = 0;
  int img [H][W];
  int kq [7][7];
  real kr [4] [4];

  gauss_unit #(.MAXW(MAXW)) dut (.clk, .rst_n, .push, .pix, .width(16'(W)), .filt, .raw, .exit_pix);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, idx, cy, cx, acc;
    // |dy|, |dx| indexed quarter of the 7x7 kernel (sigma = 2)
    kr[0] = '{0.046056, 0.040749, 0.028224, 0.015302};
    kr[1] = '{0.040749, 0.036054, 0.024972, 0.013539};
    kr[2] = '{0.028224, 0.024972, 0.017296, 0.009377};
    kr[3] = '{0.015302, 0.013539, 0.009377, 0.005084};
    for (int r = 0; r < 7; r++)
      for (int c = 0; c < 7; c++)
        kq[r][c] = $rtoi(kr[(r < 3) ? 3 - r : r - 3][(c < 3) ? 3 - c : c - 3] * 256.0 + 0.5);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y][x] = (y < 7) ? $urandom % 256 : 255 - ($urandom % 8);
    repeat (2) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < H * W) begin
      @(negedge clk);
      push = ($urandom % 3) != 0;
      pix  = pix_t'(img[n / W][n % W]);
      @(posedge clk);
      #1;
      if (push) begin
        n++;
        push = 0;
        idx = n - 1 - 3 * W - 3;   // window centre
        if (idx >= 0) begin
          cy = idx / W;
          cx = idx % W;
          if (cy >= 3 && cx >= 3 && cx <= W - 4) begin
            acc = 0;
            for (int r = 0; r < 7; r++)
              for (int c = 0; c < 7; c++) acc += kq[r][c] * img[cy + r - 3][cx + c - 3];
            checks += 2;
            if (int'(filt) != (acc + 128) / 256) begin
              failures++;
              $display("FAIL filt (%0d,%0d) = %0d expected %0d", cy, cx, filt, (acc + 128) / 256);
            end
            if (int'(raw) != img[cy][cx]) failures++;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
