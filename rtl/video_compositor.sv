// video_compositor: builds each display pixel from the mosaic and the live
// camera picture, and pads it to 24-bit colour.
//
// The screen shows the mosaic from the top left, TILES_X library images
// across and ROWS down, and the unprocessed camera picture (CAM_W x CAM_H)
// in the upper right corner, which lies on top where the two overlap;
// everything else is black. The compositor computes the read coordinates of
// the output line buffer and of the camera-feed buffer from hcount/vcount,
// and one clock later, when their data arrive, selects the source. RGB565 is
// widened to 8 bits per channel by appending zero bits. The corner overlay
// and the padding follow the design description; the exact placement and
// zero padding are this design's choice.
//
// Timing: syncs and data enable are delayed by the same one clock as the
// pixel, so `rgb`, `hsync_o`, `vsync_o` and `de` belong together.
module video_compositor
  import photomosaica_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned V_ACTIVE = 720,
  parameter int unsigned TILES_X  = 64,
  parameter int unsigned ROWS     = 45,
  parameter int unsigned CAM_W    = 320,
  parameter int unsigned CAM_H    = 240,
  parameter int unsigned HW       = 11,
  parameter int unsigned VW       = 10,
  localparam int unsigned LXW     = $clog2(TILES_X * TILE),
  localparam int unsigned CXW     = $clog2(CAM_W),
  localparam int unsigned CYW     = $clog2(CAM_H)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [HW-1:0]  hcount,
  input  logic [VW-1:0]  vcount,
  input  logic           hsync,
  input  logic           vsync,
  input  logic           active,
  // output line buffer read port
  output logic           olb_rhalf,
  output logic [3:0]     olb_rline,
  output logic [LXW-1:0] olb_rx,
  input  rgb565_t        olb_pixel,
  // camera-feed buffer read port
  output logic [CXW-1:0] cam_rx,
  output logic [CYW-1:0] cam_ry,
  input  rgb565_t        cam_pixel,
  // to the encoders
  output logic [23:0]    rgb,
  output logic           hsync_o,
  output logic           vsync_o,
  output logic           de
);

  localparam int unsigned CAM_X0 = H_ACTIVE - CAM_W;

  logic in_cam, in_mosaic;
  logic sel_cam_q, sel_mos_q, active_q;

  always_comb begin
    in_cam    = (32'(hcount) >= CAM_X0) && (32'(hcount) < H_ACTIVE) && (32'(vcount) < CAM_H);
    in_mosaic = (32'(hcount) < TILES_X * TILE) && (32'(vcount) < ROWS * TILE)
                && (32'(vcount) < V_ACTIVE);
    olb_rhalf = vcount[4];
    olb_rline = vcount[3:0];
    olb_rx    = LXW'(hcount);
    cam_rx    = CXW'(32'(hcount) - CAM_X0);
    cam_ry    = CYW'(vcount);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_cam_q <= 1'b0;
      sel_mos_q <= 1'b0;
      active_q  <= 1'b0;
      hsync_o   <= 1'b0;
      vsync_o   <= 1'b0;
    end else begin
      sel_cam_q <= in_cam && active;
      sel_mos_q <= in_mosaic && active;
      active_q  <= active;
      hsync_o   <= hsync;
      vsync_o   <= vsync;
    end
  end

  rgb565_t src;
  always_comb begin
    if (sel_cam_q)      src = cam_pixel;
    else if (sel_mos_q) src = olb_pixel;
    else                src = '0;
    rgb = {src.r, 3'b000, src.g, 2'b00, src.b, 3'b000};
  end

  assign de = active_q;

endmodule
