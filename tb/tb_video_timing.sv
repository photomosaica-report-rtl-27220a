// tb_video_timing: runs the default 1280x720 timing for two frames and
// checks the line length (1650), frame length (750), the positions and
// widths of hsync (40 at 1390) and vsync (5 lines at 725), the active area
// and one new_frame per frame.
module tb_video_timing;
  logic clk = 1'b0, rst = 1'b1;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, active, new_frame;
  int checks = 0, failures = 0;

  video_timing dut (.*);

  always #5 clk = ~clk;

  initial begin
    #40ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, v, frames, act;
    repeat (3) @(negedge clk); rst = 1'b0;
    @(negedge clk);
    while (!new_frame) @(negedge clk);
    h = 0; v = 0; frames = 0; act = 0;
    repeat (2 * 1650 * 750) begin
      checks++;
      if (int'(hcount) != h || int'(vcount) != v
          || hsync != (h >= 1390 && h < 1430)
          || vsync != (v >= 725 && v < 730)
          || active != (h < 1280 && v < 720)
          || new_frame != (h == 0 && v == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL at (%0d,%0d): %0d %0d %0d %0d %0d %0d", h, v,
                                    hcount, vcount, hsync, vsync, active, new_frame);
      end
      if (active) act++;
      h++;
      if (h == 1650) begin h = 0; v++; if (v == 750) begin v = 0; frames++; end end
      @(negedge clk);
    end
    checks++;
    if (act != 2 * 1280 * 720) begin failures++; $display("FAIL %0d active pixels", act); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
