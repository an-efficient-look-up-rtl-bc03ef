// line_buffer: one image row of delay for a raster pixel stream.
//
// A circular memory of DEPTH words with one pointer. On every cycle with en
// high, dout shows the word written DEPTH enables earlier at the same
// pointer (read before write), din is written in its place and the pointer
// advances, wrapping from DEPTH-1 to 0. The read is asynchronous, which maps
// to LUT RAM on an FPGA; with en low nothing changes. The memory is cleared
// only by the writes of the first row: what dout shows before DEPTH writes
// is whatever the memory held.
//
// Parameters: DEPTH (the image width, 512), WIDTH (pixel width, 8).
// The published design names only the line buffers; the structure is
// this design's choice.
module line_buffer #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          ptr <= '0;
    else if (en && ptr == AW'(DEPTH-1))  ptr <= '0;
    else if (en)                         ptr <= ptr + 1'b1;
  end

endmodule
