// ov7670_model: behavioural model of the OV7670 camera in RGB565 mode.
//
// Free-running PCLK with half period HALF_NS. Each frame: VSYNC high for
// VSYNC_CLKS pclks, then H lines, each 2*W pclks with HREF high (two bytes
// per pixel, high byte first) and HBLANK pclks with HREF low. Data change on
// the falling PCLK edge. The picture is tb_photomosaica_pkg::cam_pixel with
// the current `pattern`; `frames` counts completed frames.
module ov7670_model #(
  parameter int W = 320,
  parameter int H = 240,
  parameter int HBLANK = 16,
  parameter int VSYNC_CLKS = 64,
  parameter int HALF_NS = 24
) (
  input  int          pattern,
  output logic        pclk,
  output logic        href,
  output logic        vsync,
  output logic [7:0]  data,
  output int          frames
);
  import tb_photomosaica_pkg::*;

  initial begin
    pclk = 1'b0; href = 1'b0; vsync = 1'b0; data = '0; frames = 0;
    forever #(HALF_NS * 1ns) pclk = ~pclk;
  end

  initial begin
    logic [15:0] px;
    int p;
    forever begin
      @(negedge pclk); vsync = 1'b1;
      repeat (VSYNC_CLKS) @(negedge pclk);
      vsync = 1'b0;
      repeat (HBLANK) @(negedge pclk);
      p = pattern;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          px = cam_pixel(x, y, p);
          href = 1'b1; data = px[15:8];
          @(negedge pclk); data = px[7:0];
          @(negedge pclk);
        end
        href = 1'b0; data = '0;
        repeat (HBLANK) @(negedge pclk);
      end
      frames = frames + 1;
    end
  end
endmodule
