// photomosaica_top: real-time photomosaic video system.
//
// A 320x240 camera picture is cut into 5x5-pixel chunks; each chunk is
// replaced on screen by a 16x16-pixel photograph from an image library whose
// average colour matches the chunk's, giving a 1024x720 mosaic on a 1280x720
// HDMI display with the live camera picture in the upper right corner. The
// library holds one photograph per RGB565 colour (65536 images of 512 bytes),
// so matching is just averaging: the average colour is the image number.
//
// Data flow (clk_pixel unless noted):
//   camera_capture -> input_line_buffer (10 lines) -> chunk_reader ->
//   image_matcher -> frame_buffer (one image number per tile);
//   camera_capture -> camera_feed_buffer (full 320x240 picture);
//   video_timing -> output_generator: reads image numbers, fetches the
//   images from DDR3 via memory_controller into output_line_buffer (two
//   rows of tiles) just before they are displayed;
//   video_compositor -> three tmds_encoder -> TMDS symbols.
//   memory_controller (clk_ui, with FIFOs to clk_sd and clk_pixel) first
//   copies the library from the SD card into DDR3, then serves reads.
//
// Not inside this module: the clock generator (74.25 MHz pixel clock,
// 81.25 MHz memory-interface user clock, 25 MHz SD clock), the DDR3 memory
// interface and chip (their user-interface signals app_* are ports), the SD
// card controller (its block-request and byte-stream signals sd_* are
// ports), the camera, and the 10:1 TMDS serialisers.
//
// Switches: sw[0] selects the image library (changing it reloads DDR3);
// sw[1] pauses the mosaic (the image matcher stops updating the frame
// buffer). LEDs: led[15:4] load progress; led[3] loading, led[2] read data
// arriving, led[1] output generator busy, led[0] frame-buffer update.
// Each clock domain has its own synchronous active-high reset.
module photomosaica_top
  import photomosaica_pkg::*;
#(
  parameter int unsigned NUM_IMAGES = 65536,
  parameter int unsigned CAM_W      = 320,
  parameter int unsigned CAM_H      = 240,
  parameter int unsigned H_ACTIVE   = 1280,
  parameter int unsigned H_FP       = 110,
  parameter int unsigned H_SYNC     = 40,
  parameter int unsigned H_BP       = 220,
  parameter int unsigned V_ACTIVE   = 720,
  parameter int unsigned V_FP       = 5,
  parameter int unsigned V_SYNC     = 5,
  parameter int unsigned V_BP       = 20
) (
  input  logic        clk_pixel,
  input  logic        rst_pixel,
  input  logic        clk_ui,
  input  logic        rst_ui,
  input  logic        clk_sd,
  input  logic        rst_sd,
  // camera
  input  logic        cam_pclk,
  input  logic        cam_href,
  input  logic        cam_vsync,
  input  logic [7:0]  cam_data,
  // user controls
  input  logic [1:0]  sw,
  output logic [15:0] led,
  // SD card controller
  output logic        sd_req_valid,
  input  logic        sd_req_ready,
  output logic [31:0] sd_req_addr,
  input  logic        sd_byte_valid,
  output logic        sd_byte_ready,
  input  logic [7:0]  sd_byte,
  // DDR3 memory interface (user side)
  output logic        app_en,
  output logic [2:0]  app_cmd,
  output ddr_addr_t   app_addr,
  input  logic        app_rdy,
  output ddr_word_t   app_wdf_data,
  output logic        app_wdf_wren,
  output logic        app_wdf_end,
  input  logic        app_wdf_rdy,
  input  ddr_word_t   app_rd_data,
  input  logic        app_rd_data_valid,
  // HDMI
  output logic [9:0]  tmds_red,
  output logic [9:0]  tmds_green,
  output logic [9:0]  tmds_blue,
  output logic [23:0] video_rgb,
  output logic        video_hsync,
  output logic        video_vsync,
  output logic        video_de
);

  localparam int unsigned TILES_X = CAM_W / CHUNK;
  localparam int unsigned TILES_Y = CAM_H / CHUNK;
  localparam int unsigned ROWS    = (TILES_Y < V_ACTIVE / TILE) ? TILES_Y : V_ACTIVE / TILE;
  localparam int unsigned LINE_W  = TILES_X * TILE;
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW      = $clog2(H_TOTAL);
  localparam int unsigned VW      = $clog2(V_TOTAL);
  localparam int unsigned XW      = $clog2(CAM_W);
  localparam int unsigned YW      = $clog2(CAM_H);
  localparam int unsigned ILB_AW  = $clog2(10 * CAM_W);
  localparam int unsigned FB_AW   = $clog2(TILES_X * TILES_Y);
  localparam int unsigned OLB_AW  = 1 + 4 + $clog2(LINE_W / PIX_PER_WORD);

  // ---------------- pause switch synchroniser
  logic [1:0] pause_s;
  always_ff @(posedge clk_pixel) begin
    if (rst_pixel) pause_s <= '0;
    else           pause_s <= {pause_s[0], sw[1]};
  end

  // ---------------- camera input
  logic          cam_valid;
  rgb565_t       cam_pix;
  logic [XW-1:0] cam_x;
  logic [YW-1:0] cam_y;
  logic          cam_frame_done;

  camera_capture #(.CAM_W(CAM_W), .CAM_H(CAM_H)) u_camera_capture (
    .clk(clk_pixel), .rst(rst_pixel),
    .cam_pclk, .cam_href, .cam_vsync, .cam_data,
    .pixel_valid(cam_valid), .pixel(cam_pix), .x(cam_x), .y(cam_y), .frame_done(cam_frame_done));

  logic [ILB_AW-1:0] ilb_raddr;
  rgb565_t           ilb_rdata;
  logic              half_ready, half;
  logic [YW-1:0]     chunk_row;

  input_line_buffer #(.CAM_W(CAM_W), .CAM_H(CAM_H)) u_input_line_buffer (
    .clk(clk_pixel), .rst(rst_pixel),
    .we(cam_valid), .wx(cam_x), .wy(cam_y), .wdata(cam_pix),
    .raddr(ilb_raddr), .rdata(ilb_rdata),
    .half_ready, .half, .chunk_row);

  logic             m_ready, m_start, m_valid;
  rgb565_t          m_pixel;
  logic [FB_AW-1:0] m_tile;
  logic             chunk_overrun;

  chunk_reader #(.CAM_W(CAM_W), .CAM_H(CAM_H)) u_chunk_reader (
    .clk(clk_pixel), .rst(rst_pixel),
    .half_ready, .half, .chunk_row,
    .ilb_raddr, .ilb_rdata,
    .matcher_ready(m_ready), .start(m_start), .pixel_valid(m_valid), .pixel(m_pixel),
    .tile_index(m_tile), .overrun(chunk_overrun));

  logic             fb_we;
  logic [FB_AW-1:0] fb_waddr, fb_raddr;
  logic [15:0]      fb_wdata, fb_rdata;

  image_matcher #(.FB_AW(FB_AW)) u_image_matcher (
    .clk(clk_pixel), .rst(rst_pixel), .pause(pause_s[1]),
    .start(m_start), .pixel_valid(m_valid), .pixel(m_pixel), .tile_index(m_tile),
    .ready(m_ready), .fb_we, .fb_addr(fb_waddr), .fb_data(fb_wdata));

  frame_buffer #(.TILES_X(TILES_X), .TILES_Y(TILES_Y)) u_frame_buffer (
    .clk(clk_pixel), .we(fb_we), .waddr(fb_waddr), .wdata(fb_wdata),
    .raddr(fb_raddr), .rdata(fb_rdata));

  // ---------------- display timing and mosaic fetch
  logic [HW-1:0] hcount;
  logic [VW-1:0] vcount;
  logic          hsync, vsync, active, new_frame;

  video_timing #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_video_timing (
    .clk(clk_pixel), .rst(rst_pixel),
    .hcount, .vcount, .hsync, .vsync, .active, .new_frame);

  logic              og_req_valid, og_req_ready, og_rd_valid, og_rd_ready;
  ddr_addr_t         og_req_addr;
  ddr_word_t         og_rd_data;
  logic              olb_we;
  logic [OLB_AW-1:0] olb_waddr;
  ddr_word_t         olb_wdata;
  logic              og_busy, og_row_done, og_overrun;

  output_generator #(
    .TILES_X(TILES_X), .TILES_Y(TILES_Y), .ROWS(ROWS), .HW(HW), .VW(VW)
  ) u_output_generator (
    .clk(clk_pixel), .rst(rst_pixel), .hcount, .vcount,
    .fb_raddr, .fb_rdata,
    .req_valid(og_req_valid), .req_ready(og_req_ready), .req_addr(og_req_addr),
    .rd_valid(og_rd_valid), .rd_ready(og_rd_ready), .rd_data(og_rd_data),
    .olb_we, .olb_waddr, .olb_wdata,
    .busy(og_busy), .row_done(og_row_done), .overrun(og_overrun));

  logic                       olb_rhalf;
  logic [3:0]                 olb_rline;
  logic [$clog2(LINE_W)-1:0]  olb_rx;
  rgb565_t                    olb_pixel;

  output_line_buffer #(.LINE_W(LINE_W)) u_output_line_buffer (
    .clk(clk_pixel), .we(olb_we), .waddr(olb_waddr), .wdata(olb_wdata),
    .rhalf(olb_rhalf), .rline(olb_rline), .rx(olb_rx), .rpixel(olb_pixel));

  logic [XW-1:0] feed_rx;
  logic [YW-1:0] feed_ry;
  rgb565_t       feed_pixel;

  camera_feed_buffer #(.CAM_W(CAM_W), .CAM_H(CAM_H)) u_camera_feed_buffer (
    .clk(clk_pixel), .we(cam_valid), .wx(cam_x), .wy(cam_y), .wdata(cam_pix),
    .rx(feed_rx), .ry(feed_ry), .rdata(feed_pixel));

  video_compositor #(
    .H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .TILES_X(TILES_X), .ROWS(ROWS),
    .CAM_W(CAM_W), .CAM_H(CAM_H), .HW(HW), .VW(VW)
  ) u_video_compositor (
    .clk(clk_pixel), .rst(rst_pixel), .hcount, .vcount, .hsync, .vsync, .active,
    .olb_rhalf, .olb_rline, .olb_rx, .olb_pixel,
    .cam_rx(feed_rx), .cam_ry(feed_ry), .cam_pixel(feed_pixel),
    .rgb(video_rgb), .hsync_o(video_hsync), .vsync_o(video_vsync), .de(video_de));

  tmds_encoder u_tmds_red (
    .clk(clk_pixel), .rst(rst_pixel), .data(video_rgb[23:16]), .ctrl(2'b00),
    .de(video_de), .symbol(tmds_red));
  tmds_encoder u_tmds_green (
    .clk(clk_pixel), .rst(rst_pixel), .data(video_rgb[15:8]), .ctrl(2'b00),
    .de(video_de), .symbol(tmds_green));
  tmds_encoder u_tmds_blue (
    .clk(clk_pixel), .rst(rst_pixel), .data(video_rgb[7:0]), .ctrl({video_vsync, video_hsync}),
    .de(video_de), .symbol(tmds_blue));

  // ---------------- memory controller
  logic [11:0] load_leds;
  logic        loading;
  ma_state_t   ma_state;

  memory_controller #(.NUM_IMAGES(NUM_IMAGES)) u_memory_controller (
    .clk_ui, .rst_ui,
    .app_en, .app_cmd, .app_addr, .app_rdy,
    .app_wdf_data, .app_wdf_wren, .app_wdf_end, .app_wdf_rdy,
    .app_rd_data, .app_rd_data_valid,
    .sw_library(sw[0]), .load_leds, .loading, .state_o(ma_state),
    .clk_sd, .rst_sd,
    .sd_req_valid, .sd_req_ready, .sd_req_addr,
    .sd_byte_valid, .sd_byte_ready, .sd_byte,
    .clk_pixel, .rst_pixel,
    .og_req_valid, .og_req_ready, .og_req_addr,
    .og_rd_valid, .og_rd_ready, .og_rd_data);

  assign led = {load_leds, loading, og_rd_valid, og_busy, fb_we};

endmodule
