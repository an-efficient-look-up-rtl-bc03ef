// gauss_window: 3x3 neighbourhood generator for a raster-scan pixel stream.
//
// Pixels arrive row by row, IMG_W per row, IMG_H rows per frame, one per
// cycle with in_valid high (gaps are allowed). Two cascaded line buffers
// give, for the incoming pixel p(r,c), the pixels p(r-1,c) and p(r-2,c) of
// the two previous rows in the same cycle. That column of three is shifted
// into a 3x3 register window, so after the shift the window holds rows
// r-2..r and columns c-2..c. The window is flagged valid (win_valid, one
// cycle after the pixel) only when it lies wholly inside the frame, i.e.
// r >= 2 and c >= 2; it is then centred on pixel (r-1, c-1). A frame of
// IMG_W x IMG_H pixels thus gives (IMG_W-2) x (IMG_H-2) windows, and
// win_last marks the last of them. Border pixels get no output: the
// published design says nothing of borders, and this is this design's
// choice, as are the line-buffer structure and the counters. Row and column
// counters wrap at the end of a frame, so frames follow each other without
// a gap; a reset restarts the frame.
//
// Interface: in_valid/in_pix in; win (win_t, row 0 oldest, col 0 leftmost),
// win_valid, win_last out. Latency: one cycle.
module gauss_window
  import gauss_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pix_t in_pix,
  output win_t win,
  output logic win_valid,
  output logic win_last
);

  localparam int unsigned CW = $clog2(IMG_W);
  localparam int unsigned RW = $clog2(IMG_H);

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  pix_t          row1_pix;   // p(r-1, c)
  pix_t          row2_pix;   // p(r-2, c)

  line_buffer #(.DEPTH(IMG_W), .WIDTH(PIX_W)) u_lb1 (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .din  (in_pix),
    .dout (row1_pix)
  );

  line_buffer #(.DEPTH(IMG_W), .WIDTH(PIX_W)) u_lb2 (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .din  (row1_pix),
    .dout (row2_pix)
  );

  logic last_col, last_row;
  assign last_col = (col == CW'(IMG_W-1));
  assign last_row = (row == RW'(IMG_H-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0;
      row <= '0;
    end else if (in_valid) begin
      if (last_col) begin
        col <= '0;
        row <= last_row ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win       <= '0;
      win_valid <= 1'b0;
      win_last  <= 1'b0;
    end else begin
      win_valid <= in_valid && (row >= RW'(2)) && (col >= CW'(2));
      win_last  <= in_valid && last_row && last_col;
      if (in_valid) begin
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= win[r][1];
          win[r][1] <= win[r][2];
        end
        win[0][2] <= row2_pix;
        win[1][2] <= row1_pix;
        win[2][2] <= in_pix;
      end
    end
  end

  initial begin
    assert (IMG_W >= 3 && IMG_H >= 3)
      else $error("gauss_window: the image must be at least 3x3");
  end

endmodule
