// tb_output_line_buffer: fills both halves (32 lines x 128 words of 8
// pixels) with random 128-bit words, then reads every pixel of a sample of
// lines back by (half, line, x) and checks it against pixel x mod 8 of word
// x / 8, one clock after the address.
module tb_output_line_buffer;
  import photomosaica_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  logic [11:0] waddr = '0;
  ddr_word_t wdata = '0;
  logic rhalf = 1'b0;
  logic [3:0] rline = '0;
  logic [9:0] rx = '0;
  rgb565_t rpixel;
  ddr_word_t ref_mem [4096];
  int checks = 0, failures = 0;

  output_line_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ddr_word_t w;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); we = 1'b1; waddr = 12'(i);
      wdata = {$urandom, $urandom, $urandom, $urandom}; ref_mem[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int h = 0; h < 2; h++)
      for (int l = 0; l < 16; l += 5)
        for (int x = 0; x < 1024; x++) begin
          rhalf = h[0]; rline = 4'(l); rx = 10'(x);
          @(negedge clk);
          w = ref_mem[h * 2048 + l * 128 + x / 8];
          checks++;
          if (rpixel != w[16 * (x % 8) +: 16]) begin
            failures++; $display("FAIL half %0d line %0d x %0d", h, l, x);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
