// tb_fifo: random valid/ready traffic into a 4-deep FIFO; checks order and
// data against a queue model and the full/empty flags every cycle.
module tb_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_val = 0, in_rdy, out_val, out_rdy = 0;
  logic [15:0] in_data = 0, out_data;
  logic [2:0]  count;
  int checks = 0, failures = 0;
  logic [15:0] q [$];

  fifo #(.DW(16), .DEPTH(DEPTH)) dut (.clk, .rst_n, .in_val, .in_rdy, .in_data,
                                      .out_val, .out_rdy, .out_data, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_val  = ($urandom % 3) != 0;
      in_data = 16'($urandom);
      out_rdy = ($urandom % 3) == 0 || i > 1500;
      #1;
      checks++;
      if (in_rdy !== (q.size() < DEPTH) || out_val !== (q.size() > 0) || int'(count) != q.size()) begin
        failures++;
        $display("FAIL flags at %0d: in_rdy=%b out_val=%b count=%0d model=%0d", i, in_rdy, out_val, count, q.size());
      end
      if (out_val && out_rdy) begin
        checks++;
        if (out_data !== q[0]) begin
          failures++;
          $display("FAIL data at %0d: %h expected %h", i, out_data, q[0]);
        end
      end
      @(posedge clk);
      if (out_val && out_rdy) void'(q.pop_front());
      if (in_val && in_rdy) q.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
