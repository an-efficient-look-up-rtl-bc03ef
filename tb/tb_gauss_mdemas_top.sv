// tb_gauss_mdemas_top: end-to-end test of the Gaussian filter on small
// frames (16 x 12, three frames back to back) with random input gaps.
//
// Every output pixel is compared with a model of the same filter built from
// the adder truth table, in raster order, and its arrival is checked to be
// exactly two cycles after the input pixel that completed its window. The
// test counts how often each mechanism of the design was exercised and
// fails if one never was: input gaps (stream stalls), border pixels that
// produce no output, outputs changed by the approximate adders, frame
// wrap-around, and the end-of-frame flag.
module tb_gauss_mdemas_top;
  import gauss_pkg::*;
  import tb_mdemas_ref_pkg::*;

  localparam int W = 16, H = 12, FRAMES = 3;

  typedef struct {
    int unsigned pix;
    int          cyc;
    bit          last;
  } exp_t;

  logic clk = 0, rst_n = 0, in_valid = 0;
  pix_t in_pix = '0;
  logic out_valid, out_last;
  pix_t out_pix;

  int checks = 0, failures = 0, cyc = 0;
  int n_gap = 0, n_border = 0, n_approx = 0, n_frames = 0, n_last = 0, n_out = 0;
  int unsigned img[H][W];
  exp_t exp_q[$];

  gauss_mdemas_top #(.IMG_W(W), .IMG_H(H)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pix(in_pix),
    .out_valid(out_valid), .out_pix(out_pix), .out_last(out_last));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor: outputs are registered, so sample them at the falling edge
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", out_pix);
      end else begin
        e = exp_q.pop_front();
        if (int'(out_pix) != int'(e.pix) || out_last != e.last || cyc != e.cyc) begin
          failures++;
          $display("FAIL out=%0d last=%0b cyc=%0d, expected %0d last=%0b cyc=%0d",
                   out_pix, out_last, cyc, e.pix, e.last, e.cyc);
        end
        if (out_last) n_last++;
      end
    end else if (rst_n) begin
      checks++;
      if (out_last) failures++;
    end
  end

  initial begin
    int unsigned p[3][3];
    exp_t e;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          while ($urandom % 4 == 0) begin
            in_valid = 0;
            n_gap++;
            @(negedge clk);
          end
          // smooth ramp plus noise, so that windows resemble image content
          img[r][c] = (r * 7 + c * 11 + f * 40 + $urandom % 64) % 256;
          if (f == 1 && r == 5) img[r][c] = 255;  // a saturated row
          in_valid = 1;
          in_pix   = pix_t'(img[r][c]);
          if (r >= 2 && c >= 2) begin
            for (int i = 0; i < 3; i++)
              for (int j = 0; j < 3; j++) p[i][j] = img[r-2+i][c-2+j];
            e.pix  = ref_filter(p, 1);
            e.cyc  = cyc + 2;
            e.last = (r == H - 1 && c == W - 1);
            if (ref_filter(p, 0) != e.pix) n_approx++;
            exp_q.push_back(e);
          end else begin
            n_border++;
          end
        end
      n_frames++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_out != FRAMES * (W - 2) * (H - 2)) begin
      failures++;
      $display("FAIL %0d outputs, %0d still expected", n_out, exp_q.size());
    end
    $display("mechanisms: gaps=%0d border_inputs=%0d approximated=%0d frames=%0d last=%0d",
             n_gap, n_border, n_approx, n_frames, n_last);
    checks += 5;
    if (n_gap == 0)      failures++;
    if (n_border == 0)   failures++;
    if (n_approx == 0)   failures++;
    if (n_frames < 2)    failures++;
    if (n_last != FRAMES) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
