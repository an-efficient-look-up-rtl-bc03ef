// gauss_mdemas_top: 2D 3x3 Gaussian smoothing filter (sigma = 1) for 8-bit
// grey images, with every addition done by the MDeMAS LUT-based
// approximate adder.
//
// A raster pixel stream enters at in_pix/in_valid, one pixel per cycle at
// most (gaps allowed, no back-pressure). gauss_window turns it into 3x3
// neighbourhoods using two line buffers of IMG_W pixels; gauss_adder_tree
// forms the weighted sum with eight 8-bit MDeMAS adders; the result is
// registered. Output: one smoothed pixel per interior input position, so a
// frame of IMG_W x IMG_H pixels gives (IMG_W-2) x (IMG_H-2) pixels in raster
// order; out_last marks the last of a frame. Latency: two cycles from the
// input pixel that completes a window (the pixel below-right of its centre)
// to out_valid.
//
// Parameters: IMG_W, IMG_H, the frame size (512 x 512, the test image of the
// filter's evaluation). The filter, kernel and adder follow the published
// design; border handling, the stream interface and the pipeline
// registers are this design's choices.
module gauss_mdemas_top
  import gauss_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pix_t in_pix,
  output logic out_valid,
  output pix_t out_pix,
  output logic out_last
);

  win_t win;
  logic win_valid, win_last;
  pix_t sum_pix;

  gauss_window #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_window (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_pix   (in_pix),
    .win      (win),
    .win_valid(win_valid),
    .win_last (win_last)
  );

  gauss_adder_tree u_tree (
    .win(win),
    .pix(sum_pix)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= win_valid;
      out_last  <= win_last;
      if (win_valid) out_pix <= sum_pix;
    end
  end

endmodule
