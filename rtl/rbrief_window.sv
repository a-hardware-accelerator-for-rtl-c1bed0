// rbrief_window: one copy of the 37x37 window of filtered pixels used by the
// rBRIEF unit, with NRD random read ports.
//
// Each of the N window rows is a Delay FIFO (circular buffer) of length
// width sharing one pointer: on a push, row 0 stores the new pixel and every
// row q > 0 stores the word row q-1 is overwriting, so row q holds the image
// line q lines above the newest one. Unlike the flip-flop windows, a window
// position is reached by address: the pixel dx columns right of and dy rows
// below the window centre (dx, dy in -R..R, R = (N-1)/2) is read from row
// R - dy at address (ptr - 1 - (R - dx)) mod width.
//
// Reads are combinational. Requires N <= width <= MAXW. Row-per-Delay-FIFO
// storage follows the document; the read-port count is this design's choice
// (two per copy: one BRIEF pair per cycle).
module rbrief_window
  import orb_pkg::*;
#(
  parameter int MAXW = 210,
  parameter int N    = 2 * BRIEF_R + 1,
  parameter int NRD  = 2,
  parameter int WW   = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  pix_t                   din,
  input  logic [WW-1:0]          width,
  input  logic signed [5:0]      rd_dx [NRD],
  input  logic signed [5:0]      rd_dy [NRD],
  output pix_t                   rd_data [NRD]
);

  localparam int R  = (N - 1) / 2;
  localparam int AW = $clog2(MAXW);

  logic [AW-1:0] ptr;
  logic [AW-1:0] addr [NRD];
  pix_t          chain [N];
  pix_t          row_rd [N][NRD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              ptr <= '0;
    else if (push) begin
      if (32'(ptr) >= 32'(width) - 1)        ptr <= '0;
      else                                   ptr <= ptr + AW'(1);
    end
  end

  always_comb begin
    for (int k = 0; k < NRD; k++) begin
      int a;
      a = int'(ptr) - 1 - (R - int'(rd_dx[k]));
      if (a < 0) a += int'(width);
      addr[k] = AW'(a);
    end
  end

  for (genvar q = 0; q < N; q++) begin : g_row
    pix_t m [MAXW];
    assign chain[q] = m[ptr];
    always_ff @(posedge clk) begin
      if (push) m[ptr] <= (q == 0) ? din : chain[(q == 0) ? 0 : q - 1];
    end
    for (genvar k = 0; k < NRD; k++) begin : g_rd
      assign row_rd[q][k] = m[addr[k]];
    end
  end

  always_comb begin
    for (int k = 0; k < NRD; k++) rd_data[k] = row_rd[R - int'(rd_dy[k])][k];
  end

endmodule
