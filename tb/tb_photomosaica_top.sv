// tb_photomosaica_top: end-to-end run of the whole system with a 256-image
// library (the camera picture is chosen so every chunk maps to an image
// number below 256); all other sizes are the defaults: 320x240 camera,
// 1280x720 display, 64x45 tiles shown.
//
// The camera, SD card and DDR3 interface are behavioural models. Sequence:
//   1. load library 0; read requests of the output side wait meanwhile;
//   2. after two camera frames, one whole displayed frame is compared pixel
//      by pixel with a reference built independently: chunk averages ->
//      image numbers -> library pixels, camera picture in the top right
//      corner, black elsewhere;
//   3. pause (sw[1]) and change the camera picture: the mosaic must keep the
//      old picture while the corner shows the new one;
//   4. release pause: the mosaic follows the new picture;
//   5. switch library (sw[0]): DDR3 is reloaded and the mosaic is drawn
//      from library 1.
// Each mechanism (load, stalled fetch during load, DDR backpressure, row
// refill, pause, library switch, corner overlay) is counted and must occur.
module tb_photomosaica_top;
  import photomosaica_pkg::*;
  import tb_photomosaica_pkg::*;
  localparam int NIMG = 256;

  logic clk_pixel = 1'b0, clk_ui = 1'b0, clk_sd = 1'b0;
  logic rst_pixel = 1'b1, rst_ui = 1'b1, rst_sd = 1'b1;
  logic cam_pclk, cam_href, cam_vsync;
  logic [7:0] cam_data;
  logic [1:0] sw = 2'b00;
  logic [15:0] led;
  logic sd_req_valid, sd_req_ready, sd_byte_valid, sd_byte_ready;
  logic [31:0] sd_req_addr;
  logic [7:0] sd_byte;
  logic app_en, app_rdy, app_wdf_wren, app_wdf_end, app_wdf_rdy, app_rd_data_valid;
  logic [2:0] app_cmd;
  ddr_addr_t app_addr;
  ddr_word_t app_wdf_data, app_rd_data;
  logic [9:0] tmds_red, tmds_green, tmds_blue;
  logic [23:0] video_rgb;
  logic video_hsync, video_vsync, video_de;
  int pattern = 0, frames;
  int checks = 0, failures = 0;

  photomosaica_top #(.NUM_IMAGES(NIMG)) dut (.*);

  ov7670_model #(.W(320), .H(240), .HBLANK(16), .VSYNC_CLKS(64), .HALF_NS(24)) cam (
    .pattern, .pclk(cam_pclk), .href(cam_href), .vsync(cam_vsync), .data(cam_data), .frames);

  sd_card_model #(.LATENCY(30)) sd (
    .clk(clk_sd), .rst(rst_sd), .req_valid(sd_req_valid), .req_ready(sd_req_ready),
    .req_addr(sd_req_addr), .byte_valid(sd_byte_valid), .byte_ready(sd_byte_ready),
    .byte_data(sd_byte));

  mig_model #(.READ_LAT(24), .STALL_PCT(10)) mig (.clk(clk_ui), .rst(rst_ui), .*);

  always #6.734 clk_pixel = ~clk_pixel;   // 74.25 MHz
  always #6.154 clk_ui = ~clk_ui;         // 81.25 MHz
  always #20 clk_sd = ~clk_sd;            // 25 MHz

  // ---------------- mechanism counters
  int n_stalled_fetch = 0, n_row_refills = 0, n_overruns = 0, n_fb_writes = 0;
  int n_loads = 0, n_chunk_overruns = 0;
  logic loading_q = 1'b1;
  always @(posedge clk_pixel) if (!rst_pixel) begin
    if (dut.og_req_valid && !dut.og_req_ready) n_stalled_fetch++;
    if (dut.og_row_done) n_row_refills++;
    if (dut.og_overrun) n_overruns++;
    if (dut.fb_we) n_fb_writes++;
    if (dut.chunk_overrun) n_chunk_overruns++;
  end
  always @(posedge clk_ui) if (!rst_ui) begin
    if (loading_q && !dut.loading) n_loads++;
    loading_q <= dut.loading;
  end

  // ---------------- reference frame check
  logic [15:0] img_tab [48][64];
  int n_overlay = 0, n_mosaic = 0;

  task automatic check_frame(input int lib, input int mos_pat, input int cam_pat, input string what);
    int p, x, y, bad, ovr0;
    logic [23:0] exp;
    for (int cy = 0; cy < 48; cy++)
      for (int cx = 0; cx < 64; cx++) img_tab[cy][cx] = chunk_image(cx, cy, mos_pat);
    @(posedge video_vsync);
    @(negedge video_vsync);
    ovr0 = n_overruns;
    p = 0; bad = 0;
    while (p < 1280 * 720) begin
      @(negedge clk_pixel);
      if (video_de) begin
        x = p % 1280; y = p / 1280;
        if (x >= 960 && y < 240) begin
          exp = pad(cam_pixel(x - 960, y, cam_pat)); n_overlay++;
        end else if (x < 1024) begin
          exp = pad(lib_pixel(32'(lib * NIMG * 512), int'(img_tab[y / 16][x / 16]), y % 16, x % 16));
          n_mosaic++;
        end else exp = '0;
        checks++;
        if (video_rgb != exp) begin
          failures++; bad++;
          if (bad < 4) $display("FAIL %s (%0d,%0d): %h expected %h", what, x, y, video_rgb, exp);
        end
        p++;
      end
    end
    checks++;
    if (n_overruns != ovr0) begin failures++; $display("FAIL %s: row fetch overran", what); end
    $display("%s: %0d mismatching pixels", what, bad);
  endtask

  task automatic wait_cam_frames(input int n);
    int f0;
    f0 = frames;
    wait (frames >= f0 + n);
    repeat (2000) @(posedge clk_pixel);
  endtask

  initial begin
    #400ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int refills0;
    repeat (4) @(posedge clk_sd);
    rst_pixel = 1'b0; rst_ui = 1'b0; rst_sd = 1'b0;
    // 1. library load
    wait (!dut.loading);
    repeat (4) @(posedge clk_ui);
    checks++;
    if (led[15:4] != 12'hFFF) begin failures++; $display("FAIL load LEDs %b", led[15:4]); end
    $display("library 0 loaded at %0t", $time);
    // 2. live mosaic
    wait_cam_frames(2);
    check_frame(0, 0, 0, "live");
    // 3. pause
    sw[1] = 1'b1;
    repeat (10) @(posedge clk_pixel);
    pattern = 1;
    wait_cam_frames(2);
    check_frame(0, 0, 1, "paused");
    // 4. resume
    sw[1] = 1'b0;
    wait_cam_frames(2);
    check_frame(0, 1, 1, "resumed");
    // 5. library switch
    refills0 = n_row_refills;
    sw[0] = 1'b1;
    wait (dut.loading);
    wait (!dut.loading);
    $display("library 1 loaded at %0t", $time);
    check_frame(1, 1, 1, "library 1");
    // mechanisms
    $display("loads=%0d stalled_fetch=%0d refills=%0d ddr_cmd_stalls=%0d ddr_wdf_stalls=%0d fb_writes=%0d overlay=%0d mosaic=%0d",
             n_loads, n_stalled_fetch, n_row_refills, mig.cmd_stalls, mig.wdf_stalls, n_fb_writes,
             n_overlay, n_mosaic);
    checks++; if (n_loads != 2) begin failures++; $display("FAIL loads %0d", n_loads); end
    checks++; if (n_stalled_fetch == 0) begin failures++; $display("FAIL no fetch waited for a load"); end
    checks++; if (n_row_refills < 4 * 45) begin failures++; $display("FAIL refills %0d", n_row_refills); end
    checks++; if (mig.cmd_stalls == 0 || mig.wdf_stalls == 0) begin failures++; $display("FAIL no DDR stall"); end
    checks++; if (n_fb_writes < 2 * 3072) begin failures++; $display("FAIL fb writes %0d", n_fb_writes); end
    checks++; if (n_overlay == 0 || n_mosaic == 0) begin failures++; $display("FAIL no overlay/mosaic"); end
    checks++; if (n_chunk_overruns != 0) begin failures++; $display("FAIL chunk reader overran"); end
    checks++; if (mig.bad_writes != 0) begin failures++; $display("FAIL malformed DDR writes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
