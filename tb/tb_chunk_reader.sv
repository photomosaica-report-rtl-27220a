// tb_chunk_reader: the line buffer is modelled as a one-clock-latency
// memory holding a known picture, and the matcher as a consumer that stays
// busy for a random time after each start. Checks, for every chunk of two
// halves (one announced while the first is being read), the 25 pixels in
// order on consecutive clocks, start on the first, and the tile index.
module tb_chunk_reader;
  import photomosaica_pkg::*;
  import tb_photomosaica_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic half_ready = 1'b0, half = 1'b0;
  logic [7:0] chunk_row = '0;
  logic [11:0] ilb_raddr, tile_index;
  rgb565_t ilb_rdata, pixel;
  logic matcher_ready, start, pixel_valid, overrun;
  int checks = 0, failures = 0, chunks = 0, busy_cnt = 0, npix = 0, overruns = 0;
  int exp_row [2];

  chunk_reader dut (.*);

  always #5 clk = ~clk;

  // line buffer: half 0 holds camera lines 10..14 (chunk row 2), half 1
  // lines 15..19 (chunk row 3)
  always_ff @(posedge clk) begin
    int slot, x;
    slot = int'(ilb_raddr) / 320; x = int'(ilb_raddr) % 320;
    ilb_rdata <= rgb565_t'(cam_pixel(x, 10 + slot, 1));
  end

  // matcher model
  assign matcher_ready = (busy_cnt == 0);
  always_ff @(posedge clk) begin
    if (start) busy_cnt <= 25 + $urandom_range(40);
    else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    if (overrun && !rst) overruns++;
  end

  // checker
  int cx, cy, h;
  always @(negedge clk) begin
    if (pixel_valid) begin
      if (start) begin
        checks++;
        if (npix != 0) begin failures++; $display("FAIL start inside a chunk"); end
        npix = 0;
        h  = chunks / 64;
        cx = chunks % 64;
        cy = exp_row[h];
        checks++;
        if (tile_index != 12'(cy * 64 + cx)) begin
          failures++; $display("FAIL chunk %0d index %0d", chunks, tile_index);
        end
      end
      checks++;
      if (pixel != cam_pixel(cx * 5 + npix % 5, 10 + h * 5 + npix / 5, 1)) begin
        failures++; $display("FAIL chunk %0d pixel %0d", chunks, npix);
      end
      npix++;
      if (npix == 25) begin npix = 0; chunks++; end
    end else if (npix != 0) begin
      failures++; $display("FAIL gap inside chunk %0d", chunks);
      npix = 0;
    end
  end

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_row[0] = 2; exp_row[1] = 3;
    repeat (3) @(negedge clk); rst = 1'b0;
    @(negedge clk); half_ready = 1'b1; half = 1'b0; chunk_row = 8'd2;
    @(negedge clk); half_ready = 1'b0;
    repeat (500) @(negedge clk);
    half_ready = 1'b1; half = 1'b1; chunk_row = 8'd3;
    @(negedge clk); half_ready = 1'b0;
    wait (chunks == 128);
    repeat (100) @(negedge clk);
    checks++;
    if (chunks != 128 || overruns != 0) begin
      failures++; $display("FAIL %0d chunks, %0d overruns", chunks, overruns);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
