// tb_async_fifo: pushes a numbered sequence from a 10 ns clock into a
// 13 ns clock with random valid/ready on both sides; checks order, no loss,
// that the FIFO reports full and that it then blocks writes.
module tb_async_fifo;
  logic wr_clk = 1'b0, rd_clk = 1'b0, wr_rst = 1'b1, rd_rst = 1'b1;
  logic wr_valid = 1'b0, wr_ready, rd_valid, rd_ready = 1'b0;
  logic [15:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0, sent = 0, got = 0, full_seen = 0;
  localparam int N = 2000;

  async_fifo #(.WIDTH(16), .ADDR_W(3)) dut (.*);

  always #5 wr_clk = ~wr_clk;
  always #6.5 rd_clk = ~rd_clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    repeat (4) @(posedge wr_clk);
    wr_rst = 1'b0;
    while (sent < N) begin
      @(negedge wr_clk);
      wr_valid = ($urandom_range(3) != 0);
      wr_data  = 16'(sent);
      @(posedge wr_clk);
      if (!wr_ready) full_seen++;
      if (wr_valid && wr_ready) sent++;
    end
    @(negedge wr_clk) wr_valid = 1'b0;
  end

  // reader: slow at first so the FIFO fills
  initial begin
    repeat (4) @(posedge rd_clk);
    rd_rst = 1'b0;
    repeat (60) @(posedge rd_clk);
    while (got < N) begin
      @(negedge rd_clk);
      rd_ready = ($urandom_range(2) != 0);
      @(posedge rd_clk);
      if (rd_valid && rd_ready) begin
        checks++;
        if (rd_data != 16'(got)) begin
          failures++;
          $display("FAIL got %0d expected %0d", rd_data, got);
        end
        got++;
      end
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL full never seen"); end
    repeat (10) @(posedge rd_clk);
    checks++;
    if (rd_valid) begin failures++; $display("FAIL data left after the last word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
