// tb_gauss_mdemas_top_full: the Gaussian filter at its default size, one
// 512 x 512 frame streamed with random input gaps, every parameter left at
// its default.
//
// Every output pixel is compared with a model of the same filter built from
// the adder truth table, and its arrival is checked to be exactly two cycles
// after the input pixel that completed its window. The test also reports
// the PSNR of the approximate filter output against the same filter with
// exact additions, and counts input gaps, border pixels, outputs changed by
// the approximation and the end-of-frame flag, failing if one never occurs.
module tb_gauss_mdemas_top_full;
  import gauss_pkg::*;
  import tb_mdemas_ref_pkg::*;

  localparam int W = 512, H = 512, FRAMES = 1;

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
  real  sq_err = 0.0;

  gauss_mdemas_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pix(in_pix),
    .out_valid(out_valid), .out_pix(out_pix), .out_last(out_last));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000000) @(posedge clk);
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
          if (r == 5) img[r][c] = 255;  // a saturated row
          in_valid = 1;
          in_pix   = pix_t'(img[r][c]);
          if (r >= 2 && c >= 2) begin
            for (int i = 0; i < 3; i++)
              for (int j = 0; j < 3; j++) p[i][j] = img[r-2+i][c-2+j];
            e.pix  = ref_filter(p, 1);
            e.cyc  = cyc + 2;
            e.last = (r == H - 1 && c == W - 1);
            if (ref_filter(p, 0) != e.pix) n_approx++;
            sq_err += real'((ref_filter(p, 0) - e.pix) ** 2);
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
    if (sq_err > 0.0)
      $display("PSNR of approximate against exact filter: %0.2f dB",
               10.0 * $log10(255.0 * 255.0 * real'(n_out) / sq_err));
    checks += 5;
    if (n_gap == 0)      failures++;
    if (n_border == 0)   failures++;
    if (n_approx == 0)   failures++;
    if (n_frames < 1)    failures++;
    if (n_last != FRAMES) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
