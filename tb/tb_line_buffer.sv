// tb_line_buffer: drives a short line buffer with random data and random
// enable gaps and checks that each output is the word written DEPTH enables
// earlier, and that nothing moves while enable is low.
module tb_line_buffer;
  localparam int DEPTH = 5;

  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;
  logic [7:0] hist[$];

  line_buffer #(.DEPTH(DEPTH), .WIDTH(8)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      din = 8'($urandom);
      held = dout;
      #1;
      if (en) begin
        if (hist.size() >= DEPTH) begin
          checks++;
          if (dout !== hist[hist.size() - DEPTH]) begin
            failures++;
            $display("FAIL dout=%0h expected %0h", dout, hist[hist.size() - DEPTH]);
          end
        end
        hist.push_back(din);
      end
      @(posedge clk);
      #1;
      if (!en) begin
        checks++;
        if (dout !== held) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
