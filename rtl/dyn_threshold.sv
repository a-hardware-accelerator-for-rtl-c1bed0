// dyn_threshold: dirty bit of each 30x30 dynamic-threshold tile of the
// current band of tiles.
//
// The image is divided into tiles of TILE x TILE pixels. For the feature
// position x (column of the unpadded image) the module gives the tile index
// tile = x / TILE and whether that tile is already dirty, i.e. already holds
// a corner found with the initial (high) threshold. mark sets the dirty bit
// of tile when is_ini is 1. clear resets all bits when a band of tiles has
// been flushed. Dirty tiles keep only their IniThr descriptors; clean tiles
// keep their MinThr descriptors.
//
// Timing: tile and cur_dirty are combinational; mark and clear act at the
// clock edge (clear wins).
// The dirty bit per tile follows the document; tracking only the current
// band of tiles (one row of NT tiles) is this design's choice.
module dyn_threshold
  import orb_pkg::*;
#(
  parameter int NT = 7,
  parameter int TW = $clog2(NT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  coord_t        x,
  input  logic          mark,
  input  logic          is_ini,
  input  logic          clear,
  output logic [TW-1:0] tile,
  output logic          cur_dirty,
  output logic [NT-1:0] dirty
);

  assign tile      = TW'(x / coord_t'(TILE));
  assign cur_dirty = dirty[tile];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                dirty <= '0;
    else if (clear)            dirty <= '0;
    else if (mark && is_ini)   dirty[tile] <= 1'b1;
  end

endmodule
