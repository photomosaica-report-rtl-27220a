// tb_camera_feed_buffer: writes a whole 320x240 picture pixel by pixel by
// (x, y), then reads random coordinates back one clock later and compares
// with the picture.
module tb_camera_feed_buffer;
  import photomosaica_pkg::*;
  import tb_photomosaica_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  logic [8:0] wx = '0, rx = '0;
  logic [7:0] wy = '0, ry = '0;
  rgb565_t wdata = '0, rdata;
  int checks = 0, failures = 0;

  camera_feed_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y;
    for (int yy = 0; yy < 240; yy++)
      for (int xx = 0; xx < 320; xx++) begin
        @(negedge clk); we = 1'b1; wx = 9'(xx); wy = 8'(yy);
        wdata = rgb565_t'(cam_pixel(xx, yy, 5) ^ 16'(xx * 131));
      end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      x = $urandom_range(319); y = $urandom_range(239);
      rx = 9'(x); ry = 8'(y);
      @(negedge clk);
      checks++;
      if (rdata != (cam_pixel(x, y, 5) ^ 16'(x * 131))) begin
        failures++; $display("FAIL (%0d,%0d): %h", x, y, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
