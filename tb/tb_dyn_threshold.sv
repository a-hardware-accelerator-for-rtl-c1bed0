// tb_dyn_threshold: random feature positions, marks and band clears against
// a model of the per-tile dirty bits; checks tile index, current dirty bit
// and the whole vector.
module tb_dyn_threshold;
  import orb_pkg::*;
  localparam int NT = 7;
  logic clk = 0, rst_n = 0, mark = 0, is_ini = 0, clear = 0;
  coord_t x = 0;
  logic [2:0] tile;
  logic cur_dirty;
  logic [NT-1:0] dirty, model = '0;
  int checks = 0, failures = 0;

  dyn_threshold #(.NT(NT)) dut (.clk, .rst_n, .x, .mark, .is_ini, .clear, .tile, .cur_dirty, .dirty);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      x      = coord_t'($urandom % 210);
      mark   = ($urandom % 4) == 0;
      is_ini = ($urandom % 2) == 0;
      clear  = ($urandom % 40) == 0;
      #1;
      checks += 3;
      if (int'(tile) != int'(x) / 30) begin failures++; $display("FAIL tile x=%0d tile=%0d", x, tile); end
      if (cur_dirty !== model[int'(x) / 30]) begin failures++; $display("FAIL cur_dirty x=%0d", x); end
      if (dirty !== model) begin failures++; $display("FAIL dirty %b model %b", dirty, model); end
      @(posedge clk);
      if (clear) model = '0;
      else if (mark && is_ini) model[int'(x) / 30] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
