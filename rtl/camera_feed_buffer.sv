// camera_feed_buffer: a full 320x240 RGB565 copy of the live camera image.
//
// Every captured pixel is written at y * CAM_W + x as it arrives; the video
// compositor reads it back to show the unprocessed camera picture in the
// upper right corner of the screen next to the mosaic. The size follows the
// design description; it is the largest memory of the design.
//
// Interface: one write port and one read port on the same clock; read data
// appear one clock after the read coordinates.
module camera_feed_buffer
  import photomosaica_pkg::*;
#(
  parameter int unsigned CAM_W = 320,
  parameter int unsigned CAM_H = 240,
  localparam int unsigned XW = $clog2(CAM_W),
  localparam int unsigned YW = $clog2(CAM_H),
  localparam int unsigned DEPTH = CAM_W * CAM_H,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [XW-1:0] wx,
  input  logic [YW-1:0] wy,
  input  rgb565_t       wdata,
  input  logic [XW-1:0] rx,
  input  logic [YW-1:0] ry,
  output rgb565_t       rdata
);

  rgb565_t mem [DEPTH];

  logic [AW-1:0] waddr, raddr;
  assign waddr = AW'(wy) * AW'(CAM_W) + AW'(wx);
  assign raddr = AW'(ry) * AW'(CAM_W) + AW'(rx);

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
