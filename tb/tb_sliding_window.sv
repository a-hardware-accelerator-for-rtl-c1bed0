// tb_sliding_window: streams numbered pixels into 7x7 and 3x3 windows with
// random gaps and checks every window position against the pixel index it
// must hold (row r, column c: pushed ((K-1-r) * width + (K-1-c)) pushes
// before the newest one).
module tb_sliding_window;
  localparam int MAXW = 24;
  localparam int W    = 17;
  logic clk = 0, rst_n = 0, push = 0;
  logic [11:0] din = 0;
  logic [6:0][6:0][11:0] win7;
  logic [2:0][2:0][11:0] win3;
  logic [11:0] ex7, ex3;
  int checks = 0, failures = 0;
  int n = 0;

  sliding_window #(.DW(12), .K(7), .MAXW(MAXW)) dut7 (
    .clk, .rst_n, .push, .din, .width(16'(W)), .win(win7), .exit_pix(ex7));
  sliding_window #(.DW(12), .K(3), .MAXW(MAXW)) dut3 (
    .clk, .rst_n, .push, .din, .width(16'(W)), .win(win3), .exit_pix(ex3));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (n < 600) begin
      @(negedge clk);
      push = ($urandom % 3) != 0;
      din  = 12'(n);
      @(posedge clk);
      #1;
      if (push) begin
        n++;
        push = 0;
        if (n >= 6 * W + 7) begin
          for (int r = 0; r < 7; r++)
            for (int c = 0; c < 7; c++) begin
              checks++;
              if (int'(win7[r][c]) != n - 1 - ((6 - r) * W + (6 - c))) begin
                failures++;
                if (failures < 10) $display("FAIL K7 n=%0d [%0d][%0d]=%0d", n, r, c, win7[r][c]);
              end
            end
          if (n >= 6 * W + 8) begin
            checks++;
            if (int'(ex7) != n - 1 - (6 * W + 7)) failures++;
          end
        end
        if (n >= 2 * W + 3) begin
          for (int r = 0; r < 3; r++)
            for (int c = 0; c < 3; c++) begin
              checks++;
              if (int'(win3[r][c]) != n - 1 - ((2 - r) * W + (2 - c))) begin
                failures++;
                if (failures < 10) $display("FAIL K3 n=%0d [%0d][%0d]=%0d", n, r, c, win3[r][c]);
              end
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
