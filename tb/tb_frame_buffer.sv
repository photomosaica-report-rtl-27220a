// tb_frame_buffer: writes random image numbers to random tiles, keeps a
// reference copy, and checks one-clock-latency reads of every entry.
module tb_frame_buffer;
  logic clk = 1'b0, we = 1'b0;
  logic [11:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] ref_mem [3072];
  int checks = 0, failures = 0;

  frame_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3072; i++) begin
      @(negedge clk); we = 1'b1; waddr = 12'(i); wdata = 16'($urandom); ref_mem[i] = wdata;
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk); we = 1'b1; waddr = 12'($urandom_range(3071)); wdata = 16'($urandom);
      ref_mem[waddr] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 3072; i++) begin
      raddr = 12'(i);
      @(negedge clk);
      checks++;
      if (rdata != ref_mem[i]) begin
        failures++; $display("FAIL entry %0d: %h expected %h", i, rdata, ref_mem[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
