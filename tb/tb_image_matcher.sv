// tb_image_matcher: feeds random 5x5 chunks and checks that exactly one
// frame-buffer write follows each, with the truncated per-channel average
// as data and the chunk's tile index as address; with pause high no write
// may happen. Also checks the chunk-to-write latency stays within
// 25 + 64 + a few clocks.
module tb_image_matcher;
  import photomosaica_pkg::*;
  logic clk = 1'b0, rst = 1'b1, pause = 1'b0, start = 1'b0, pixel_valid = 1'b0;
  rgb565_t pixel;
  logic [11:0] tile_index, fb_addr;
  logic ready, fb_we;
  logic [15:0] fb_data;
  int checks = 0, failures = 0, writes = 0;

  image_matcher dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (fb_we) writes++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chunk(input bit paused);
    rgb565_t px [25];
    int sr, sg, sb, cycles, w0, tail;
    logic [11:0] idx;
    logic [15:0] exp;
    sr = 0; sg = 0; sb = 0;
    idx = 12'($urandom_range(3071));
    for (int i = 0; i < 25; i++) begin
      px[i] = rgb565_t'(16'($urandom));
      sr += px[i].r; sg += px[i].g; sb += px[i].b;
    end
    exp = {5'(sr / 25), 6'(sg / 25), 5'(sb / 25)};
    @(negedge clk);
    while (!ready) @(negedge clk);
    pause = paused;
    w0 = writes;
    for (int i = 0; i < 25; i++) begin
      start = (i == 0); pixel_valid = 1'b1; pixel = px[i]; tile_index = (i == 0) ? idx : 12'($urandom);
      @(negedge clk);
    end
    start = 1'b0; pixel_valid = 1'b0;
    cycles = 0;
    tail = 0;
    while (tail < 3) begin
      if (ready && cycles > 1) tail++;
      if (fb_we) begin
        checks++;
        if (paused || fb_addr != idx || fb_data != exp) begin
          failures++;
          $display("FAIL write addr=%0d data=%h expected addr=%0d data=%h paused=%0d",
                   fb_addr, fb_data, idx, exp, paused);
        end
      end
      @(negedge clk); cycles++;
    end
    checks++;
    if (writes - w0 != (paused ? 0 : 1) || cycles > 80) begin
      failures++;
      $display("FAIL %0d writes, %0d cycles after the chunk", writes - w0, cycles);
    end
  endtask

  initial begin
    pixel = '0; tile_index = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 200; i++) chunk(i % 10 == 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
