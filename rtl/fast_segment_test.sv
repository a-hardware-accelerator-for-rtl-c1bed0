// fast_segment_test: FAST-9 segment test on a 16-bit comparison string.
//
// bits[i] is 1 when circle pixel i passed the comparison with the centre
// (brighter than centre + threshold, or darker than centre - threshold).
// hit is 1 when 9 circularly consecutive bits are all 1. Purely
// combinational: one 9-input AND per starting position, ORed together (the
// AND tree of the document).
module fast_segment_test #(
  parameter int N   = 16,
  parameter int ARC = 9
) (
  input  logic [N-1:0] bits,
  output logic         hit
);

  logic [N-1:0] arc_ok;

  always_comb begin
    for (int s = 0; s < N; s++) begin
      arc_ok[s] = 1'b1;
      for (int j = 0; j < ARC; j++) arc_ok[s] &= bits[(s + j) % N];
    end
  end

  assign hit = |arc_ok;

endmodule
