// rbrief_unit: orientation and steered (rotated) BRIEF descriptor of the
// feature at the centre of a 37x37 window of Gauss-filtered pixels.
//
// The filtered stream is pushed into REPL identical copies of the window
// (rbrief_window); every copy has two read ports, so 2 * REPL pixels can be
// read per cycle. When start is pulsed (pipeline stalled, window frozen on
// the feature) the unit runs:
//   MOM   intensity moments m10 = sum(dx * I), m01 = sum(dy * I) over the
//         disc dx^2 + dy^2 <= 15^2, one 31-pixel row in ceil(31 / (2*REPL))
//         cycles (62 cycles for REPL = 8);
//   SQRT  r = floor(sqrt(m01^2 + m10^2)), one result bit per cycle (24);
//   DIV   sin = m01 * 2^14 / r, cos = m10 * 2^14 / r (signed Q1.14,
//         truncated toward zero), one quotient bit per cycle (15 + 1);
//         r = 0 gives sin = 0, cos = 1;
//   BRF   256 / REPL cycles; in cycle j copy k evaluates pair
//         i = k * (256 / REPL) + j: both points (x, y) of the fixed pattern
//         are rotated to col = round((x*cos - y*sin) / 2^14),
//         row = round((x*sin + y*cos) / 2^14) (half rounds up), read, and
//         bit i = (I(point 1) < I(point 2)).
// done pulses one cycle after the last BRIEF cycle with desc, sin_q and
// cos_q valid; busy is high from start to done. For REPL = 8 one descriptor
// takes 62 (MOM) + 1 + 24 (SQRT) + 16 (DIV, incl. load) + 32 (BRF) + 1 = 136
// cycles from the start edge to done.
//
// Follows the document: 37x37 window of Delay-FIFO rows, replicated REPL
// times (8 in its main configuration), sin/cos from the moments with the
// square-root normalisation, pattern rotation and one pair per copy per
// cycle with an incrementing table index. The document computes the moments
// in this unit but does not say how; the row-by-row pass over the window,
// the 15-pixel disc, the iterative square root and divider and the BRIEF
// pattern itself (see orb_pkg) are this design's choices.
module rbrief_unit
  import orb_pkg::*;
#(
  parameter int MAXW = 210,
  parameter int REPL = 8,
  parameter int WW   = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  pix_t          fpix,
  input  logic [WW-1:0] width,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output desc_t         desc,
  output logic signed [15:0] sin_q,
  output logic signed [15:0] cos_q
);

  localparam int NP   = 2 * REPL;                 // read ports
  localparam int MD   = 2 * MOM_R + 1;            // 31
  localparam int NPP  = DESC_BITS / REPL;         // pairs per copy
  localparam int JW   = (NPP > 1) ? $clog2(NPP) : 1;
  localparam pattern_t PAT = gen_pattern();

  if (DESC_BITS % REPL != 0) begin : g_bad_repl
    $error("REPL must divide the descriptor length (256)");
  end

  typedef enum logic [2:0] {S_IDLE, S_MOM, S_R2, S_SQRT, S_DIV, S_BRF, S_DONE} state_t;
  state_t state;

  logic signed [5:0] rd_dx [NP];
  logic signed [5:0] rd_dy [NP];
  pix_t              rd_px [NP];

  for (genvar k = 0; k < REPL; k++) begin : g_copy
    rbrief_window #(.MAXW(MAXW), .NRD(2), .WW(WW)) u_win (
      .clk, .rst_n, .push, .din(fpix), .width,
      .rd_dx  (rd_dx[2*k +: 2]),
      .rd_dy  (rd_dy[2*k +: 2]),
      .rd_data(rd_px[2*k +: 2])
    );
  end

  // ------------------------------------------------------------ counters
  logic signed [5:0]  mrow;       // dy of the moment row, -15..15
  logic [5:0]         mcol;       // first column (0..30) of this cycle
  logic [4:0]         it;         // SQRT / DIV iteration
  logic [JW-1:0]      j;          // BRIEF cycle
  logic signed [23:0] m10, m01;
  logic [47:0]        sq_op, sq_res, sq_one;
  logic [23:0]        rad;
  logic [39:0]        ns, nc;     // remaining dividends
  logic [14:0]        qs, qc;
  logic               neg_s, neg_c;

  // ------------------------------------------------------------ addresses
  function automatic logic signed [5:0] rot(logic signed [5:0] a, logic signed [5:0] b,
                                             logic signed [15:0] ca, logic signed [15:0] cb,
                                             logic sub);
    // round((a*ca -/+ b*cb) / 2^14), clamped to the window radius
    int v;
    v = int'(a) * int'(ca);
    v = sub ? v - int'(b) * int'(cb) : v + int'(b) * int'(cb);
    v = (v + (1 << (SINCOS_FRAC - 1))) >>> SINCOS_FRAC;
    if (v >  BRIEF_R) v =  BRIEF_R;
    if (v < -BRIEF_R) v = -BRIEF_R;
    return 6'(v);
  endfunction

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      int i;
      logic signed [5:0] px, py;
      i  = (p / 2) * NPP + int'(j);
      px = PAT[4*i + 2*(p % 2)];
      py = PAT[4*i + 2*(p % 2) + 1];
      if (state == S_BRF) begin
        rd_dx[p] = rot(px, py, cos_q, sin_q, 1'b1);
        rd_dy[p] = rot(px, py, sin_q, cos_q, 1'b0);
      end else begin
        rd_dx[p] = (int'(mcol) + p >= MD) ? 6'sd0 : 6'(int'(mcol) + p - MOM_R);
        rd_dy[p] = mrow;
      end
    end
  end

  // ------------------------------------------------------------ moment sums
  logic signed [23:0] d10, d01;
  always_comb begin
    d10 = '0;
    d01 = '0;
    for (int p = 0; p < NP; p++) begin
      int dx, dy;
      dx = int'(mcol) + p - MOM_R;
      dy = int'(mrow);
      if (int'(mcol) + p < MD && dx * dx + dy * dy <= MOM_R * MOM_R) begin
        d10 += 24'(dx * int'(rd_px[p]));
        d01 += 24'(dy * int'(rd_px[p]));
      end
    end
  end

  // ------------------------------------------------------------ BRIEF bits
  logic [REPL-1:0] bits;
  always_comb begin
    for (int k = 0; k < REPL; k++) bits[k] = rd_px[2*k] < rd_px[2*k+1];
  end

  // ------------------------------------------------------------ control
  logic [47:0] sq_try;
  assign sq_try = sq_res + sq_one;
  assign busy   = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      desc  <= '0;
      sin_q <= '0;
      cos_q <= 16'sd16384;
      mrow  <= '0;
      mcol  <= '0;
      it    <= '0;
      j     <= '0;
      m10   <= '0;
      m01   <= '0;
      sq_op <= '0;
      sq_res <= '0;
      sq_one <= '0;
      rad   <= '0;
      ns    <= '0;
      nc    <= '0;
      qs    <= '0;
      qc    <= '0;
      neg_s <= 1'b0;
      neg_c <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_MOM;
          mrow  <= -6'(MOM_R);
          mcol  <= '0;
          m10   <= '0;
          m01   <= '0;
        end
        S_MOM: begin
          m10 <= m10 + d10;
          m01 <= m01 + d01;
          if (int'(mcol) + NP >= MD) begin
            mcol <= '0;
            if (mrow == 6'(MOM_R)) state <= S_R2;
            else                   mrow  <= mrow + 6'sd1;
          end else begin
            mcol <= mcol + 6'(NP);
          end
        end
        S_R2: begin
          sq_op  <= 48'(m01) * 48'(m01) + 48'(m10) * 48'(m10);
          sq_res <= '0;
          sq_one <= 48'(1) << 46;
          it     <= '0;
          neg_s  <= m01[23];
          neg_c  <= m10[23];
          state  <= S_SQRT;
        end
        S_SQRT: begin
          if (sq_op >= sq_try) begin
            sq_op  <= sq_op - sq_try;
            sq_res <= (sq_res >> 1) + sq_one;
          end else begin
            sq_res <= sq_res >> 1;
          end
          sq_one <= sq_one >> 2;
          it     <= it + 5'd1;
          if (it == 5'd23) begin
            state <= S_DIV;
            it    <= '0;
          end
        end
        S_DIV: begin
          if (it == 5'd0) begin
            rad <= sq_res[23:0];
            ns  <= (m01[23] ? -40'(m01) : 40'(m01)) << SINCOS_FRAC;
            nc  <= (m10[23] ? -40'(m10) : 40'(m10)) << SINCOS_FRAC;
            qs  <= '0;
            qc  <= '0;
            it  <= 5'd1;
          end else begin
            int b;
            b = 15 - int'(it);   // quotient bit 14 .. 0
            if (ns >= (40'(rad) << b)) begin
              ns    <= ns - (40'(rad) << b);
              qs[b] <= 1'b1;
            end
            if (nc >= (40'(rad) << b)) begin
              nc    <= nc - (40'(rad) << b);
              qc[b] <= 1'b1;
            end
            it <= it + 5'd1;
            if (it == 5'd15) state <= S_BRF;
          end
          j <= '0;
        end
        S_BRF: begin
          for (int k = 0; k < REPL; k++) desc[k * NPP + int'(j)] <= bits[k];
          j <= j + JW'(1);
          if (32'(j) == NPP - 1) state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      // sin / cos become valid when the division ends
      if (state == S_DIV && it == 5'd15) begin
        logic [14:0] fs, fc;
        fs = qs;
        fc = qc;
        if (ns >= 40'(rad)) fs[0] = 1'b1;
        if (nc >= 40'(rad)) fc[0] = 1'b1;
        if (rad == '0) begin
          sin_q <= 16'sd0;
          cos_q <= 16'sd16384;
        end else begin
          sin_q <= neg_s ? -16'(fs) : 16'(fs);
          cos_q <= neg_c ? -16'(fc) : 16'(fc);
        end
      end
    end
  end

endmodule
