// tb_orb_store_buffer: fills 3 tile buffers of depth 4 with random entries
// (some overflow), flushes with random dirty bits under random output
// back-pressure, and checks the released entries, their order and the drop
// count against a model.
module tb_orb_store_buffer;
  import orb_pkg::*;
  localparam int NT = 3, DEPTH = 4;
  logic clk = 0, rst_n = 0, wr_en = 0, flush = 0, busy, out_val, out_rdy = 0;
  logic [1:0] wr_tile = 0;
  orb_entry_t wr_entry, out_entry;
  logic [NT-1:0] flush_dirty = 0;
  logic [31:0] drop_count;
  int checks = 0, failures = 0, drops = 0, outs = 0;
  orb_entry_t tq [NT][$];
  orb_entry_t exp_q [$];

  orb_store_buffer #(.NT(NT), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wr_tile, .wr_entry,
    .flush, .flush_dirty, .busy, .out_val, .out_rdy, .out_entry, .drop_count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side: random ready, compare every accepted entry
  always @(posedge clk) begin
    if (out_val && out_rdy) begin
      checks++;
      outs++;
      if (exp_q.size() == 0 || out_entry !== exp_q[0]) begin
        failures++;
        $display("FAIL unexpected output x=%0d y=%0d", out_entry.x, out_entry.y);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    out_rdy <= ($urandom % 2) == 0;
  end

  initial begin
    wr_entry = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int band = 0; band < 20; band++) begin
      int nw;
      nw = $urandom % 16;
      for (int i = 0; i < nw; i++) begin
        @(negedge clk);
        wr_en    = 1;
        wr_tile  = 2'($urandom % NT);
        wr_entry = '{desc: {8{32'($urandom)}}, x: 16'($urandom), y: 16'(band),
                     ini: 1'($urandom), min: 1'($urandom)};
        if (tq[wr_tile].size() < DEPTH) tq[wr_tile].push_back(wr_entry);
        else drops++;
        @(posedge clk);
        #1 wr_en = 0;
      end
      @(negedge clk);
      flush       = 1;
      flush_dirty = 3'($urandom);
      for (int t = 0; t < NT; t++) begin
        foreach (tq[t][k]) if (flush_dirty[t] ? tq[t][k].ini : tq[t][k].min) exp_q.push_back(tq[t][k]);
        tq[t].delete();
      end
      @(posedge clk);
      #1 flush = 0;
      @(posedge clk);
      while (busy) @(posedge clk);
      repeat (2) @(posedge clk);
      checks++;
      if (exp_q.size() != 0) begin
        failures++;
        $display("FAIL band %0d: %0d entries not released", band, exp_q.size());
        exp_q.delete();
      end
    end
    checks++;
    if (int'(drop_count) != drops) begin
      failures++;
      $display("FAIL drop_count %0d expected %0d", drop_count, drops);
    end
    if (outs == 0 || drops == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
