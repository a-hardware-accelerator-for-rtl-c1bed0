// orb_store_buffer: holds ORB descriptors until the threshold of their
// dynamic-threshold tile is decided, then releases the valid ones.
//
// There is one FIFO of DEPTH entries per tile of a band (NT tiles).
// wr_en stores wr_entry in the FIFO of wr_tile; if that FIFO is full the
// descriptor is dropped and drop_count is incremented. A flush pulse
// (with the band's dirty bits) starts a pass over the tiles in index order:
// every entry is popped, and it is sent on the out_val/out_rdy port if it is
// valid for its tile (dirty tile: entry.ini; clean tile: entry.min), or
// discarded otherwise. busy is high from the flush pulse until every FIFO is
// empty. Writes must not be issued while busy.
//
// One buffer per tile (MaxWidth / 30 of them) follows the document; the
// depth, the drop-on-full policy and the tile-ordered flush are this
// design's choices.
module orb_store_buffer
  import orb_pkg::*;
#(
  parameter int NT    = 7,
  parameter int DEPTH = 32,
  parameter int TW    = $clog2(NT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [TW-1:0] wr_tile,
  input  orb_entry_t    wr_entry,
  input  logic          flush,
  input  logic [NT-1:0] flush_dirty,
  output logic          busy,
  output logic          out_val,
  input  logic          out_rdy,
  output orb_entry_t    out_entry,
  output logic [31:0]   drop_count
);

  localparam int EW = $bits(orb_entry_t);
  localparam int CW = $clog2(DEPTH + 1);

  logic [NT-1:0]  f_in_rdy, f_out_val, f_pop;
  logic [EW-1:0]  f_out [NT];
  logic [CW-1:0]  f_cnt [NT];
  logic [NT-1:0]  dirty_q;
  logic [TW-1:0]  cur;
  orb_entry_t     head;
  logic           keep;

  for (genvar t = 0; t < NT; t++) begin : g_tile
    fifo #(.DW(EW), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_val  (wr_en && 32'(wr_tile) == t),
      .in_rdy  (f_in_rdy[t]),
      .in_data (wr_entry),
      .out_val (f_out_val[t]),
      .out_rdy (f_pop[t]),
      .out_data(f_out[t]),
      .count   (f_cnt[t])
    );
  end

  assign head      = orb_entry_t'(f_out[cur]);
  assign keep      = dirty_q[cur] ? head.ini : head.min;
  assign out_entry = head;
  assign out_val   = busy && f_out_val[cur] && keep;

  always_comb begin
    f_pop = '0;
    if (busy && f_out_val[cur]) f_pop[cur] = keep ? out_rdy : 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cur        <= '0;
      dirty_q    <= '0;
      drop_count <= '0;
    end else begin
      if (wr_en && !f_in_rdy[wr_tile]) drop_count <= drop_count + 32'd1;
      if (flush && !busy) begin
        busy    <= 1'b1;
        cur     <= '0;
        dirty_q <= flush_dirty;
      end else if (busy && !f_out_val[cur]) begin
        if (32'(cur) == NT - 1) busy <= 1'b0;
        else                    cur  <= cur + TW'(1);
      end
    end
  end

  // Stores are only issued between flushes.
  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && busy));

endmodule
