// fifo: first-in first-out buffer with valid/ready ports on both sides.
//
// A word is written when in_val && in_rdy and read when out_val && out_rdy,
// both at the clock edge. in_rdy is low when full, out_val is low when
// empty; the head word is presented combinationally on out_data. A write
// and a read may happen in the same cycle. count gives the occupancy.
// The document uses a plain FIFO next to its Delay FIFO; the depth, the
// show-ahead output and the count port are this design's choices.
module fifo #(
  parameter int DW    = 8,
  parameter int DEPTH = 4,
  parameter int CW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_val,
  output logic          in_rdy,
  input  logic [DW-1:0] in_data,
  output logic          out_val,
  input  logic          out_rdy,
  output logic [DW-1:0] out_data,
  output logic [CW-1:0] count
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          wr, rd;

  assign in_rdy   = (32'(count) < DEPTH);
  assign out_val  = (count != '0);
  assign out_data = mem[rptr];
  assign wr       = in_val && in_rdy;
  assign rd       = out_val && out_rdy;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (wr) wptr <= inc(wptr);
      if (rd) rptr <= inc(rptr);
      count <= count + CW'(wr) - CW'(rd);
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wptr] <= in_data;
  end

  // Occupancy never exceeds the depth.
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) (32'(count) <= DEPTH);
  endproperty
  assert property (p_no_overflow);

endmodule
