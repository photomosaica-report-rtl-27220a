// tb_camera_capture: the camera model sends two small frames (32x20, one
// PCLK per 4 system clocks); every captured pixel is compared with the
// picture at its (x, y), and the pixel count per frame and the frame_done
// pulses are checked.
module tb_camera_capture;
  import photomosaica_pkg::*;
  import tb_photomosaica_pkg::*;
  localparam int W = 32, H = 20;
  logic clk = 1'b0, rst = 1'b1;
  logic cam_pclk, cam_href, cam_vsync;
  logic [7:0] cam_data;
  logic pixel_valid, frame_done;
  rgb565_t pixel;
  logic [4:0] x, y;
  int checks = 0, failures = 0, pixels = 0, done_pulses = 0, frames;
  int pattern = 4;

  ov7670_model #(.W(W), .H(H), .HBLANK(6), .VSYNC_CLKS(10), .HALF_NS(20)) cam (
    .pattern, .pclk(cam_pclk), .href(cam_href), .vsync(cam_vsync), .data(cam_data), .frames);

  camera_capture #(.CAM_W(W), .CAM_H(H)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (pixel_valid) begin
      pixels++;
      checks++;
      if (pixel != cam_pixel(int'(x), int'(y), pattern)) begin
        failures++; $display("FAIL (%0d,%0d) %h", x, y, pixel);
      end
    end
    if (frame_done) done_pulses++;
  end

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst = 1'b0;
    wait (frames == 1);            // first frame may start mid-way
    @(posedge cam_vsync);
    repeat (20) @(posedge clk);
    pixels = 0;
    wait (frames == 2);
    repeat (40) @(posedge clk);
    checks++;
    if (pixels != W * H) begin failures++; $display("FAIL %0d pixels in a frame", pixels); end
    @(posedge cam_vsync); repeat (20) @(posedge clk);
    checks++;
    if (done_pulses < 2) begin failures++; $display("FAIL %0d frame_done pulses", done_pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
