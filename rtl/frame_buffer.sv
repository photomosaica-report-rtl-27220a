// frame_buffer: one library-image number per output tile.
//
// Location (i, j) of the mosaic holds the number of the 16x16 library image
// drawn there; the image's DDR byte address is that number times 512, so the
// nine zero low bits are not stored. The image matcher writes an entry when
// it finishes a 5x5 camera chunk; the output generator reads the entries of
// the next tile row. Entry index = tile_row * TILES_X + tile_column.
//
// Interface: one write port and one read port on the same clock; the read
// data appears one clock after the address (block-RAM style). Contents are
// cleared to image 0 only by the first camera frame, not by reset.
module frame_buffer #(
  parameter int unsigned TILES_X = 64,
  parameter int unsigned TILES_Y = 48,
  parameter int unsigned IDX_W   = 16,
  localparam int unsigned ENTRIES = TILES_X * TILES_Y,
  localparam int unsigned AW      = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [IDX_W-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [IDX_W-1:0] rdata
);

  logic [IDX_W-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < ENTRIES)) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
