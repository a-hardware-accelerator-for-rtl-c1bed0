// sliding_window: K x K window over a raster-scan pixel stream.
//
// The window itself is K rows of K flip-flops. On every push the newest row
// shifts left by one and takes din at its right end; the pixel falling off
// the left end of a row goes into a line buffer (a delay_fifo of length
// width - K) whose output enters the right end of the row above. Each row
// of the window therefore holds the same K columns of consecutive image
// lines, and after a warm-up of (K-1) * width + K pushes the window shows
// a complete K x K neighbourhood that moves one pixel per push.
//
// win[r][c]: r = 0 is the oldest (top) line, c = 0 the oldest (left) column;
// the pixel just pushed is win[K-1][K-1]. exit_pix is the pixel that left
// the top row on the last push. width is the line length of the stream
// (padded image width), K < width <= MAXW.
// Structure follows the document's flip-flop sliding window; the line
// buffers as Delay FIFOs and the port names are this design's choices.
module sliding_window #(
  parameter int DW   = 8,
  parameter int K    = 7,
  parameter int MAXW = 210,
  parameter int WW   = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         push,
  input  logic [DW-1:0]                din,
  input  logic [WW-1:0]                width,
  output logic [K-1:0][K-1:0][DW-1:0]  win,
  output logic [DW-1:0]                exit_pix
);

  localparam int LBD = MAXW - K;
  localparam int LW  = $clog2(LBD + 1);

  logic [LW-1:0] lb_len;
  logic [DW-1:0] lb_out [K-1];

  assign lb_len = LW'(width - WW'(K));

  // Line buffer r carries pixels from row r+1 (left end) to row r (right end).
  for (genvar r = 0; r < K - 1; r++) begin : g_lb
    delay_fifo #(.DW(DW), .DEPTH(LBD)) u_lb (
      .clk, .rst_n, .push,
      .din  (win[r+1][0]),
      .len  (lb_len),
      .dout (lb_out[r])
    );
  end

  always_ff @(posedge clk) begin
    if (push) begin
      exit_pix <= win[0][0];
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) win[r][c] <= win[r][c+1];
        win[r][K-1] <= (r == K - 1) ? din : lb_out[r];
      end
    end
  end

endmodule
