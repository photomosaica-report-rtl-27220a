// tb_video_compositor: drives a raster with the default geometry and
// models both buffers as one-clock-latency memories (the pixel value encodes
// its coordinates). Checks that the camera picture appears at x >= 960,
// y < 240, the mosaic (from the right half and line of the line buffer)
// elsewhere left of x = 1024 in the top 720 lines, black elsewhere and in
// blanking, padding to 24 bits, and that syncs and de are delayed with the
// pixel.
module tb_video_compositor;
  import photomosaica_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [10:0] hcount = '0;
  logic [9:0] vcount = '0;
  logic hsync = 1'b0, vsync = 1'b0, active = 1'b0;
  logic olb_rhalf;
  logic [3:0] olb_rline;
  logic [9:0] olb_rx;
  rgb565_t olb_pixel, cam_pixel;
  logic [8:0] cam_rx;
  logic [7:0] cam_ry;
  logic [23:0] rgb;
  logic hsync_o, vsync_o, de;
  int checks = 0, failures = 0, n_cam = 0, n_mos = 0, n_black = 0;

  video_compositor dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    olb_pixel <= rgb565_t'({olb_rhalf, olb_rline, 1'b0, olb_rx});
    cam_pixel <= rgb565_t'({cam_ry[6:0], cam_rx});
  end

  function automatic logic [23:0] pad(input logic [15:0] p);
    return {p[15:11], 3'b0, p[10:5], 2'b0, p[4:0], 3'b0};
  endfunction

  initial begin
    #40ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] exp;
    int ph, pv;
    logic pact, phs, pvs;
    repeat (3) @(negedge clk); rst = 1'b0;
    pact = 1'b0; phs = 1'b0; pvs = 1'b0; ph = 0; pv = 0;
    for (int v = 0; v < 750; v += 3)
      for (int h = 0; h < 1650; h++) begin
        hcount = 11'(h); vcount = 10'(v);
        active = (h < 1280 && v < 720);
        hsync = (h >= 1390 && h < 1430); vsync = (v >= 725 && v < 730);
        @(negedge clk);
        // one clock after the coordinates were applied
        ph = h; pv = v; pact = active; phs = hsync; pvs = vsync;
        if (!pact) exp = '0;
        else if (ph >= 960 && pv < 240) begin exp = pad({pv[6:0], 9'(ph - 960)}); n_cam++; end
        else if (ph < 1024 && pv < 720) begin
          exp = pad({pv[4], 4'(pv % 16), 1'b0, 10'(ph)}); n_mos++;
        end
        else begin exp = '0; n_black++; end
        checks++;
        if (rgb != exp || de != pact || hsync_o != phs || vsync_o != pvs) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d): %h expected %h", ph, pv, rgb, exp);
        end
      end
    checks++;
    if (n_cam == 0 || n_mos == 0 || n_black == 0) begin failures++; $display("FAIL region missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
