// tb_photomosaica_full: the whole system at its default sizes, with no
// parameter overridden: the complete 65536-image library (32 MB) is copied
// from the SD card model into the DDR3 model at the 25 MHz SD clock, then,
// after two camera frames of a picture that uses all three colour channels
// (so image numbers span the whole library), one displayed 1280x720 frame is
// compared pixel by pixel with an independently computed reference.
module tb_photomosaica_full;
  import photomosaica_pkg::*;
  import tb_photomosaica_pkg::*;
  localparam int NIMG = 65536;
  localparam int PAT  = 100;

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
  int pattern = PAT, frames;
  int checks = 0, failures = 0;

  photomosaica_top dut (.*);

  ov7670_model #(.W(320), .H(240), .HBLANK(16), .VSYNC_CLKS(64), .HALF_NS(24)) cam (
    .pattern, .pclk(cam_pclk), .href(cam_href), .vsync(cam_vsync), .data(cam_data), .frames);

  sd_card_model #(.LATENCY(30)) sd (
    .clk(clk_sd), .rst(rst_sd), .req_valid(sd_req_valid), .req_ready(sd_req_ready),
    .req_addr(sd_req_addr), .byte_valid(sd_byte_valid), .byte_ready(sd_byte_ready),
    .byte_data(sd_byte));

  mig_model #(.READ_LAT(24), .STALL_PCT(10)) mig (.clk(clk_ui), .rst(rst_ui), .*);

  always #6.734 clk_pixel = ~clk_pixel;
  always #6.154 clk_ui = ~clk_ui;
  always #20 clk_sd = ~clk_sd;

  logic [15:0] img_tab [48][64];

  initial begin
    #2500ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, x, y, bad, f0, n_img_hi;
    logic [23:0] exp;
    repeat (4) @(posedge clk_sd);
    rst_pixel = 1'b0; rst_ui = 1'b0; rst_sd = 1'b0;
    wait (!dut.loading);
    repeat (4) @(posedge clk_ui);
    $display("library loaded at %0t", $time);
    checks++;
    if (led[15:4] != 12'hFFF || sd.requests != NIMG || mig.writes != NIMG * 32) begin
      failures++; $display("FAIL load: leds %b, %0d blocks, %0d writes", led[15:4], sd.requests, mig.writes);
    end
    f0 = frames;
    wait (frames >= f0 + 2);
    n_img_hi = 0;
    for (int cy = 0; cy < 48; cy++)
      for (int cx = 0; cx < 64; cx++) begin
        img_tab[cy][cx] = chunk_image(cx, cy, PAT);
        if (img_tab[cy][cx] >= 16'd32768) n_img_hi++;
      end
    checks++;
    if (n_img_hi == 0) begin failures++; $display("FAIL picture does not reach the upper library half"); end
    @(posedge video_vsync);
    @(negedge video_vsync);
    p = 0; bad = 0;
    while (p < 1280 * 720) begin
      @(negedge clk_pixel);
      if (video_de) begin
        x = p % 1280; y = p / 1280;
        if (x >= 960 && y < 240) exp = pad(cam_pixel(x - 960, y, PAT));
        else if (x < 1024) exp = pad(lib_pixel(32'd0, int'(img_tab[y / 16][x / 16]), y % 16, x % 16));
        else exp = '0;
        checks++;
        if (video_rgb != exp) begin
          failures++; bad++;
          if (bad < 4) $display("FAIL (%0d,%0d): %h expected %h", x, y, video_rgb, exp);
        end
        p++;
      end
    end
    $display("%0d mismatching pixels", bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
