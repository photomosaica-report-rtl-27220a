// tb_output_generator: drives a 1650x750 raster for two frames. The frame
// buffer is a one-clock-latency memory of known image numbers; the memory
// side accepts requests with random backpressure and answers each, in
// order and after a random delay, with a hash of its address. Each time a
// row is reported done, the whole refilled half of the line-buffer model is
// compared with the images of the row the raster position asked for; the
// row must be finished before the display reaches it, there must be 45 rows
// per frame (row 0 fetched in blanking) and no overrun.
module tb_output_generator;
  import photomosaica_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [10:0] hcount = '0;
  logic [9:0] vcount = '0;
  logic [11:0] fb_raddr;
  logic [15:0] fb_rdata;
  logic req_valid, req_ready, rd_valid, rd_ready;
  ddr_addr_t req_addr;
  ddr_word_t rd_data;
  logic olb_we;
  logic [11:0] olb_waddr;
  ddr_word_t olb_wdata;
  logic busy, row_done, overrun;
  ddr_word_t olb [4096];
  int checks = 0, failures = 0, rows_done = 0, overruns = 0, stalls = 0;
  int exp_row = -1, exp_line = 0;

  output_generator dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] fb_entry(input int a);
    return 16'(a * 2654435 + 77);
  endfunction
  function automatic ddr_word_t mem_word(input ddr_addr_t a);
    logic [31:0] h;
    h = 32'(a) * 32'h9E3779B1;
    return {h, ~h, h ^ 32'h5555AAAA, 32'(a)};
  endfunction

  always_ff @(posedge clk) fb_rdata <= fb_entry(int'(fb_raddr));

  // memory side
  ddr_addr_t q_addr [$];
  longint    q_time [$];
  longint    now = 0;
  always_ff @(posedge clk) begin
    now <= now + 1;
    if (req_valid && req_ready && !rst) begin
      q_addr.push_back(req_addr);
      q_time.push_back(now + 10 + $urandom_range(30));
    end
    if (req_valid && !req_ready) stalls++;
    if (rst) begin
      rd_valid <= 1'b0;
    end else if (!rd_valid || rd_ready) begin
      if (q_time.size() != 0 && q_time[0] <= now) begin
        rd_valid <= 1'b1;
        rd_data  <= mem_word(q_addr.pop_front());
        void'(q_time.pop_front());
      end else begin
        rd_valid <= 1'b0;
      end
    end
    req_ready <= ($urandom_range(3) != 0);
    if (olb_we) olb[olb_waddr] <= olb_wdata;
    if (overrun && !rst) overruns++;
  end

  initial begin
    #60ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // raster and row checks
  initial begin
    int k;
    repeat (3) @(negedge clk); rst = 1'b0;
    for (int f = 0; f < 2; f++)
      for (int v = 0; v < 750; v++)
        for (int h = 0; h < 1650; h++) begin
          hcount = 11'(h); vcount = 10'(v);
          if (h == 0 && v % 16 == 0) begin
            k = v / 16;
            if (k + 1 < 45) begin exp_row = k + 1; exp_line = v; end
            else if (k == 45) begin exp_row = 0; exp_line = v; end
          end
          // a row must be complete before its first line is displayed
          if (h == 0 && v % 16 == 0 && v < 720 && rows_done > 0 && exp_row >= 0 && busy) begin
            checks++;
            failures++; $display("FAIL fetch still busy at line %0d", v);
          end
          @(negedge clk);
          if (row_done) begin
            rows_done++;
            for (int t = 0; t < 64; t++)
              for (int w = 0; w < 32; w++) begin
                ddr_addr_t a;
                a = DDR_ADDR_W'({fb_entry(exp_row * 64 + t), 9'd0}) + DDR_ADDR_W'(w * 16);
                checks++;
                if (olb[(exp_row % 2) * 2048 + (w / 2) * 128 + t * 2 + (w % 2)] != mem_word(a)) begin
                  failures++;
                  if (failures < 4) $display("FAIL row %0d tile %0d word %0d: %h expected %h (addr %h)", exp_row, t, w, olb[(exp_row % 2) * 2048 + (w / 2) * 128 + t * 2 + (w % 2)], mem_word(a), a);
                end
              end
          end
        end
    checks++;
    if (rows_done < 89 || rows_done > 90 || overruns != 0 || stalls == 0) begin
      failures++; $display("FAIL %0d rows, %0d overruns, %0d stalls", rows_done, overruns, stalls);
    end
    $display("rows done: %0d", rows_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
