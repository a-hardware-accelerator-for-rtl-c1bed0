// orb_accelerator: streaming ORB feature extractor (FAST corners, 3x3
// non-maximal suppression, dynamic threshold per 30x30 tile, orientation by
// intensity centroid, rotated 256-bit BRIEF descriptor).
//
// Input: a padded grayscale image in raster order, one pixel per in_val &&
// in_rdy handshake. width x height is the size including a border of
// orb_pkg::BORDER (21) pixels on every side, added by the host (the
// reference software uses BORDER_REFLECT_101); width <= MAX_WIDTH. Images
// wider than MAX_WIDTH are cut by the host into overlapping tiles and
// streamed one after the other. ini_thr / min_thr are the FAST thresholds.
// Output: one record per kept feature on out_val/out_rdy: the descriptor and
// the feature's column and row in the unpadded image (tile-local).
//
// Every pixel is read once. It enters the Gauss unit directly and the FAST
// unit through a Delay FIFO of 17 * width + 17 pixels, so that the centre of
// the FAST/NMS windows and the centre of the rBRIEF window (fed by the Gauss
// output one push later) are the same pixel: the one pushed
// 21 * width + 22 pushes earlier. After every push the control looks at
// that centre. If it lies in the unpadded image and NMS keeps it (IniThr
// corner, or MinThr corner in a tile that has no IniThr corner yet), the
// whole pipeline stalls (in_rdy low) while the rBRIEF unit computes the
// descriptor, which then goes to the store buffer of its tile. When the
// centre reaches the last pixel of a band of 30 rows (or of the image), the
// pipeline stalls again while the store buffers release the descriptors
// that the tile's final threshold keeps. After the last input pixel the
// control makes one extra push with no input so that the last pixel of the
// image reaches the centre; frame_done pulses when the image is finished.
//
// Follows the document: val/rdy stream interface with width and the two
// thresholds, two units fed from the input (FAST through a Delay FIFO,
// Gauss directly), rBRIEF fed by Gauss, blocking rBRIEF, per-tile store
// buffers and dirty bits, MAX_WIDTH 210 (the medium configuration) and 8
// rBRIEF copies. This design's own choices: the height input (needed to know
// where the last band ends), the 21-pixel border, the extra drain push, the
// store depth and drop-on-full, the frame_done and drop_count outputs.
module orb_accelerator
  import orb_pkg::*;
#(
  parameter int MAX_WIDTH  = 210,
  parameter int REPL       = 8,
  parameter int TILE_DEPTH = 32,
  parameter int NT         = MAX_WIDTH / TILE
) (
  input  logic        clk,
  input  logic        rst_n,
  // pixel stream
  input  logic        in_val,
  output logic        in_rdy,
  input  pix_t        in_pix,
  // configuration (hold constant during a frame)
  input  coord_t      width,
  input  coord_t      height,
  input  pix_t        ini_thr,
  input  pix_t        min_thr,
  // feature stream
  output logic        out_val,
  input  logic        out_rdy,
  output desc_t       out_desc,
  output coord_t      out_x,
  output coord_t      out_y,
  // status
  output logic        frame_done,
  output logic [31:0] drop_count
);

  localparam int TW     = $clog2(NT);
  localparam int DDEPTH = (CENTER_ROWS - FAST_R - 1) * MAX_WIDTH + (CENTER_COLS - FAST_R - 2);
  localparam int DLW    = $clog2(DDEPTH + 1);

  typedef enum logic [1:0] {C_RUN, C_BRIEF, C_FLUSH, C_WAIT} cstate_t;
  cstate_t state;

  logic   push, drain_req, drain_push, pending, frame_first;
  pix_t   pix_in, filt, raw_c, gexit, fast_pix;
  coord_t in_col, in_row;
  logic signed [COORD_W:0] ccol, crow;

  assign pix_in = drain_push ? '0 : in_pix;
  assign push   = (in_val && in_rdy) || drain_push;

  // ------------------------------------------------------------ datapath
  gauss_unit #(.MAXW(MAX_WIDTH), .WW(COORD_W)) u_gauss (
    .clk, .rst_n, .push, .pix(pix_in), .width,
    .filt, .raw(raw_c), .exit_pix(gexit)
  );

  logic [DLW-1:0] dlen;
  assign dlen = DLW'(32'(width) * (CENTER_ROWS - FAST_R - 1) + (CENTER_COLS - FAST_R - 2));

  delay_fifo #(.DW(PIX_W), .DEPTH(DDEPTH)) u_fast_delay (
    .clk, .rst_n, .push, .din(pix_in), .len(dlen), .dout(fast_pix)
  );

  logic [SCORE_W-1:0] s_ini, s_min;
  logic               ini_feat, min_feat;

  fast_nms_unit #(.MAXW(MAX_WIDTH), .WW(COORD_W)) u_fast (
    .clk, .rst_n, .push, .pix(fast_pix), .width, .ini_thr, .min_thr,
    .score_ini(s_ini), .score_min(s_min), .ini_feat, .min_feat
  );

  logic  rb_start, rb_busy, rb_done;
  desc_t rb_desc;
  logic signed [15:0] rb_sin, rb_cos;

  rbrief_unit #(.MAXW(MAX_WIDTH), .REPL(REPL), .WW(COORD_W)) u_rbrief (
    .clk, .rst_n, .push, .fpix(filt), .width, .start(rb_start),
    .busy(rb_busy), .done(rb_done), .desc(rb_desc), .sin_q(rb_sin), .cos_q(rb_cos)
  );

  // ------------------------------------------------------------ centre
  coord_t ex, ey;
  logic   cvalid, band_pos, frame_pos, feat_need;
  logic [TW-1:0] tile;
  logic          cur_dirty, dt_mark, dt_clear;
  logic [NT-1:0] dirty;

  always_comb begin
    int cx, cy, w, h;
    cx = int'(ccol);
    cy = int'(crow);
    w  = int'(width);
    h  = int'(height);
    ex = coord_t'(cx - BORDER);
    ey = coord_t'(cy - BORDER);
    cvalid    = cx >= BORDER && cx <= w - BORDER - 1 && cy >= BORDER && cy <= h - BORDER - 1;
    band_pos  = cvalid && cx == w - BORDER - 1 &&
                (((cy - BORDER) % TILE) == TILE - 1 || cy == h - BORDER - 1);
    frame_pos = band_pos && cy == h - BORDER - 1;
  end

  dyn_threshold #(.NT(NT)) u_dt (
    .clk, .rst_n, .x(ex), .mark(dt_mark), .is_ini(ini_feat), .clear(dt_clear),
    .tile, .cur_dirty, .dirty
  );

  assign feat_need = pending && cvalid && (ini_feat || (min_feat && !cur_dirty));

  // ------------------------------------------------------------ store
  logic       sb_wr, sb_flush, sb_busy;
  logic       tag_ini, tag_min;
  orb_entry_t sb_entry, sb_out;

  assign sb_entry = '{desc: rb_desc, x: ex, y: ey, ini: tag_ini, min: tag_min};

  orb_store_buffer #(.NT(NT), .DEPTH(TILE_DEPTH)) u_store (
    .clk, .rst_n,
    .wr_en(sb_wr), .wr_tile(tile), .wr_entry(sb_entry),
    .flush(sb_flush), .flush_dirty(dirty), .busy(sb_busy),
    .out_val, .out_rdy, .out_entry(sb_out), .drop_count
  );

  assign out_desc = sb_out.desc;
  assign out_x    = sb_out.x;
  assign out_y    = sb_out.y;

  // ------------------------------------------------------------ control
  logic can_push;
  assign can_push   = (state == C_RUN) && (!pending || (!feat_need && !band_pos));
  assign in_rdy     = can_push && !drain_req;
  assign drain_push = can_push && drain_req;
  assign rb_start   = (state == C_RUN) && feat_need;
  assign dt_mark    = rb_start;
  assign sb_wr      = (state == C_BRIEF) && rb_done;
  assign sb_flush   = (state == C_FLUSH);
  assign dt_clear   = (state == C_WAIT) && !sb_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_RUN;
      pending     <= 1'b0;
      drain_req   <= 1'b0;
      frame_first <= 1'b1;
      frame_done  <= 1'b0;
      in_col      <= '0;
      in_row      <= '0;
      ccol        <= '0;
      crow        <= '0;
      tag_ini     <= 1'b0;
      tag_min     <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      case (state)
        C_RUN: begin
          if (pending) begin
            pending <= 1'b0;
            if (feat_need) begin
              state   <= C_BRIEF;
              tag_ini <= ini_feat;
              tag_min <= min_feat;
            end else if (band_pos) begin
              state <= C_FLUSH;
            end
          end
          if (push) begin
            pending <= 1'b1;
            if (frame_first) begin
              frame_first <= 1'b0;
              crow <= -(COORD_W+1)'(CENTER_ROWS + 1);
              ccol <= (COORD_W+1)'(32'(width) - CENTER_COLS);
            end else if (32'(ccol) == 32'(width) - 1) begin
              ccol <= '0;
              crow <= crow + 17'sd1;
            end else begin
              ccol <= ccol + 17'sd1;
            end
            if (drain_push) begin
              drain_req <= 1'b0;
            end else if (in_col == width - 1) begin
              in_col <= '0;
              if (in_row == height - 1) begin
                in_row    <= '0;
                drain_req <= 1'b1;
              end else begin
                in_row <= in_row + 1'b1;
              end
            end else begin
              in_col <= in_col + 1'b1;
            end
          end
        end
        C_BRIEF: if (rb_done) state <= band_pos ? C_FLUSH : C_RUN;
        C_FLUSH: state <= C_WAIT;
        C_WAIT: if (!sb_busy) begin
          state <= C_RUN;
          if (frame_pos) begin
            frame_first <= 1'b1;
            frame_done  <= 1'b1;
          end
        end
        default: state <= C_RUN;
      endcase
    end
  end

  // The rBRIEF window must not move while a descriptor is computed.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && rb_busy));
  // A handshake that is offered stays offered until taken.
  assert property (@(posedge clk) disable iff (!rst_n) out_val && !out_rdy |=> out_val);

endmodule
