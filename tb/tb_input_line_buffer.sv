// tb_input_line_buffer: writes a 320x240 picture line by line and checks
// that half_ready pulses once per five lines with the right half and chunk
// row, and that at each pulse the completed half holds the five lines just
// written (read back through the flat read port, one-clock latency).
module tb_input_line_buffer;
  import photomosaica_pkg::*;
  import tb_photomosaica_pkg::*;
  logic clk = 1'b0, rst = 1'b1, we = 1'b0;
  logic [8:0] wx = '0;
  logic [7:0] wy = '0;
  rgb565_t wdata = '0, rdata;
  logic [11:0] raddr = '0;
  logic half_ready, half;
  logic [7:0] chunk_row;
  int checks = 0, failures = 0, pulses = 0;

  input_line_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst = 1'b0;
    for (int y = 0; y < 240; y++) begin
      for (int x = 0; x < 320; x++) begin
        @(negedge clk); we = 1'b1; wx = 9'(x); wy = 8'(y); wdata = rgb565_t'(cam_pixel(x, y, 2));
      end
      @(negedge clk); we = 1'b0;
      if (y % 5 == 4) begin
        checks++;
        if (!half_ready || half != ((y / 5) % 2 == 1) || chunk_row != 8'(y / 5)) begin
          failures++; $display("FAIL pulse after line %0d: %0d %0d %0d", y, half_ready, half, chunk_row);
        end
        // read back a sample of the completed half
        for (int i = 0; i < 40; i++) begin
          int r, x;
          r = $urandom_range(4); x = $urandom_range(319);
          raddr = 12'((((y / 5) % 2) * 5 + r) * 320 + x);
          @(negedge clk);
          checks++;
          if (rdata != cam_pixel(x, y - 4 + r, 2)) begin
            failures++; $display("FAIL line %0d x %0d", y - 4 + r, x);
          end
        end
      end else begin
        checks++;
        if (half_ready) begin failures++; $display("FAIL spurious pulse after line %0d", y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
