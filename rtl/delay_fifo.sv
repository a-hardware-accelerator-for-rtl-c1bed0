// delay_fifo: fixed-delay line built as a circular buffer.
//
// Every push writes din at the pointer and advances the pointer, wrapping at
// len - 1. The word at the pointer is the one written len pushes earlier, so
// dout (combinational, read before the push) is din delayed by len pushes.
// It behaves like a chain of len shift registers but touches one entry per
// push. len may be chosen at run time (1..DEPTH) and must only change while
// the content does not matter (between frames).
//
// Interface: push/din in, dout out, len sets the delay. One push per cycle,
// no handshake: the owner decides when the line advances.
// Follows the document's Delay FIFO (circular buffer with one read and one
// write port and a single pointer); the run-time length is this design's
// choice, so that one buffer serves any line width up to DEPTH.
module delay_fifo #(
  parameter int DW    = 8,
  parameter int DEPTH = 16,
  parameter int LW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [DW-1:0] din,
  input  logic [LW-1:0] len,
  output logic [DW-1:0] dout
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (push) begin
      if (32'(ptr) >= 32'(len) - 1) ptr <= '0;
      else                          ptr <= ptr + AW'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[ptr] <= din;
  end

endmodule
