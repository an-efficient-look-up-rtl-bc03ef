// tb_gauss_window: streams three small frames (6 x 5) with random input
// gaps through the window generator and checks, one cycle after every input
// pixel, the valid and last flags and all nine window pixels against the
// frame held in the testbench.
module tb_gauss_window;
  import gauss_pkg::*;

  localparam int W = 6, H = 5, FRAMES = 3;

  logic clk = 0, rst_n = 0, in_valid = 0;
  pix_t in_pix = '0;
  win_t win;
  logic win_valid, win_last;
  int checks = 0, failures = 0, windows = 0, gaps = 0;
  int unsigned img[H][W];

  gauss_window #(.IMG_W(W), .IMG_H(H)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pix(in_pix),
    .win(win), .win_valid(win_valid), .win_last(win_last));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit exp_valid, bit exp_last, int r, int c);
    checks++;
    if (win_valid !== exp_valid || win_last !== exp_last) begin
      failures++;
      $display("FAIL flags at r=%0d c=%0d valid=%0b last=%0b", r, c, win_valid, win_last);
    end
    if (exp_valid) begin
      windows++;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          checks++;
          if (win[i][j] !== pix_t'(img[r-2+i][c-2+j])) begin
            failures++;
            $display("FAIL win[%0d][%0d] at r=%0d c=%0d", i, j, r, c);
          end
        end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          while ($urandom % 3 == 0) begin
            @(negedge clk);
            in_valid = 0;
            gaps++;
            @(posedge clk); #1;
            check(0, 0, r, c);
          end
          @(negedge clk);
          img[r][c] = $urandom % 256;
          in_valid = 1;
          in_pix = pix_t'(img[r][c]);
          @(posedge clk); #1;
          check(r >= 2 && c >= 2, r == H - 1 && c == W - 1, r, c);
        end
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (windows != FRAMES * (W - 2) * (H - 2) || gaps == 0) failures++;
    $display("windows=%0d gaps=%0d", windows, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
