// tb_delay_fifo: checks that dout equals the word pushed len pushes
// earlier, for two run-time lengths (5 and the full depth 16), with random
// gaps between pushes.
module tb_delay_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, push = 0;
  logic [7:0] din = 0, dout;
  logic [4:0] len;
  int checks = 0, failures = 0;
  logic [7:0] hist [$];

  delay_fifo #(.DW(8), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .len, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int l, int n);
    len = 5'(l);
    rst_n = 0;
    hist.delete();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      push = ($urandom % 4) != 0;
      din  = 8'($urandom);
      if (push) begin
        if (hist.size() >= l) begin
          checks++;
          if (dout !== hist[hist.size() - l]) begin
            failures++;
            $display("FAIL len=%0d push %0d: dout=%0d expected %0d", l, hist.size(), dout,
                     hist[hist.size() - l]);
          end
        end
        hist.push_back(din);
      end
      @(posedge clk);
      #1 push = 0;
    end
  endtask

  initial begin
    run(5, 300);
    run(DEPTH, 300);
    run(1, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
