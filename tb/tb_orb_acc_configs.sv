// tb_orb_acc_configs: runs the small (MAX_WIDTH 90), medium (210, the
// default) and large (420) configurations side by side on the same 48 x 30
// image (90 x 72 with border, the widest the small one takes) and checks
// that all three release the same records in the same order. The medium
// configuration is the one the end-to-end model checks (tb_orb_accelerator).
// Timing may differ by a few cycles per band, because a flush visits
// MAX_WIDTH / 30 tile buffers; each instance has its own input driver.
module tb_orb_acc_configs;
  import orb_pkg::*;
  localparam int EW = 48, EH = 30, W = EW + 2 * BORDER, H = EH + 2 * BORDER;
  logic clk = 0, rst_n = 0;
  logic   in_val [3], in_rdy [3], out_val [3], out_rdy [3], frame_done [3];
  pix_t   in_pix [3];
  desc_t  out_desc [3];
  coord_t out_x [3], out_y [3];
  logic [31:0] drop_count [3];
  int checks = 0, failures = 0, stalls = 0, finished = 0;
  int img [H][W];
  typedef struct { int x; int y; desc_t d; } rec_t;
  rec_t got [3][$];

  orb_accelerator #(.MAX_WIDTH(90)) u_small (
    .clk, .rst_n, .in_val(in_val[0]), .in_rdy(in_rdy[0]), .in_pix(in_pix[0]), .width(coord_t'(W)), .height(coord_t'(H)),
    .ini_thr(8'd20), .min_thr(8'd7), .out_val(out_val[0]), .out_rdy(out_rdy[0]), .out_desc(out_desc[0]),
    .out_x(out_x[0]), .out_y(out_y[0]), .frame_done(frame_done[0]), .drop_count(drop_count[0]));
  orb_accelerator u_medium (
    .clk, .rst_n, .in_val(in_val[1]), .in_rdy(in_rdy[1]), .in_pix(in_pix[1]), .width(coord_t'(W)), .height(coord_t'(H)),
    .ini_thr(8'd20), .min_thr(8'd7), .out_val(out_val[1]), .out_rdy(out_rdy[1]), .out_desc(out_desc[1]),
    .out_x(out_x[1]), .out_y(out_y[1]), .frame_done(frame_done[1]), .drop_count(drop_count[1]));
  orb_accelerator #(.MAX_WIDTH(420)) u_large (
    .clk, .rst_n, .in_val(in_val[2]), .in_rdy(in_rdy[2]), .in_pix(in_pix[2]), .width(coord_t'(W)), .height(coord_t'(H)),
    .ini_thr(8'd20), .min_thr(8'd7), .out_val(out_val[2]), .out_rdy(out_rdy[2]), .out_desc(out_desc[2]),
    .out_x(out_x[2]), .out_y(out_y[2]), .frame_done(frame_done[2]), .drop_count(drop_count[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < 3; k++) begin : g_drv
    always @(posedge clk) if (rst_n) begin
      if (out_val[k] && out_rdy[k]) got[k].push_back('{x: int'(out_x[k]), y: int'(out_y[k]), d: out_desc[k]});
      if (k == 1 && in_val[k] && !in_rdy[k]) stalls++;
      out_rdy[k] <= ($urandom % 3) != 0;
    end
    initial begin
      int n;
      in_val[k] = 0;
      in_pix[k] = 0;
      out_rdy[k] = 0;
      wait (rst_n);
      n = 0;
      while (n < W * H) begin
        @(negedge clk);
        in_val[k] = ($urandom % 8) != 0;
        in_pix[k] = pix_t'(img[n / W][n % W]);
        @(posedge clk);
        if (in_val[k] && in_rdy[k]) n++;
        #1 in_val[k] = 0;
      end
      while (!frame_done[k]) @(posedge clk);
      finished++;
    end
  end

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y][x] = ($urandom % 5 == 0) ? $urandom % 256 : 120;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished == 3);
    repeat (3) @(posedge clk);
    for (int k = 0; k < 3; k += 2) begin
      checks++;
      if (got[k].size() != got[1].size() || drop_count[k] != drop_count[1]) begin
        failures++;
        $display("FAIL configuration %0d: %0d records, medium %0d", k, got[k].size(), got[1].size());
      end
      for (int i = 0; i < got[k].size() && i < got[1].size(); i++) begin
        checks++;
        if (got[k][i].x != got[1][i].x || got[k][i].y != got[1][i].y || got[k][i].d !== got[1][i].d) begin
          failures++;
          if (failures < 5) $display("FAIL configuration %0d record %0d differs", k, i);
        end
      end
    end
    $display("records %0d, stall cycles %0d", got[1].size(), stalls);
    if (got[1].size() == 0 || stalls == 0) begin
      failures++;
      $display("FAIL image produced no features");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
