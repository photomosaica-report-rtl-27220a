// output_line_buffer: 32 output lines, two rows of 16x16 library images.
//
// The buffer has two halves of 16 lines each. While one half is scanned out
// to the display, the output generator refills the other with the next row
// of library images; tile row r lives in half r mod 2. Each memory word is
// one 128-bit DDR word, eight RGB565 pixels, so a DDR read response is
// stored in one write. The display side reads one pixel per clock: it
// addresses the word holding the pixel and selects the pixel inside it.
// Sizes follow the design description; the word organisation is this
// design's choice.
//
// Interface: write address = {half, line[3:0], word}, word = x / 8. Read by
// (half, line, x); the pixel appears one clock later.
module output_line_buffer
  import photomosaica_pkg::*;
#(
  parameter int unsigned LINE_W = 1024,                  // pixels per line
  localparam int unsigned WORDS = LINE_W / PIX_PER_WORD, // words per line
  localparam int unsigned WW    = $clog2(WORDS),
  localparam int unsigned AW    = 1 + 4 + WW,
  localparam int unsigned XW    = $clog2(LINE_W)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  ddr_word_t     wdata,
  input  logic          rhalf,
  input  logic [3:0]    rline,
  input  logic [XW-1:0] rx,
  output rgb565_t       rpixel
);

  ddr_word_t mem [2 * TILE * WORDS];

  ddr_word_t word_q;
  logic [2:0] sel_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    word_q <= mem[{rhalf, rline, rx[XW-1:3]}];
    sel_q  <= rx[2:0];
  end

  assign rpixel = rgb565_t'(word_q[16*sel_q +: 16]);

endmodule
