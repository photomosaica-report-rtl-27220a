// tb_memory_controller: three clock domains (81.25, 25 and 74.25 MHz) with
// the SD card and DDR3 interface models, an 8-image library and 10 % random
// stalls on the DDR interface. Checks: reads issued during the load are
// held until it ends; after the load every DDR word equals the 16 SD bytes
// packed little-endian from library 0; all 12 progress LEDs are lit and the
// LEDs rose in steps; reads return the right words in order; flipping the
// library switch reloads DDR from library 1 (SD byte address 8*512 on).
module tb_memory_controller;
  import photomosaica_pkg::*;
  import tb_photomosaica_pkg::*;
  localparam int NIMG = 8;

  logic clk_ui = 1'b0, clk_sd = 1'b0, clk_pixel = 1'b0;
  logic rst_ui = 1'b1, rst_sd = 1'b1, rst_pixel = 1'b1;
  logic app_en, app_rdy, app_wdf_wren, app_wdf_end, app_wdf_rdy, app_rd_data_valid;
  logic [2:0] app_cmd;
  ddr_addr_t app_addr;
  ddr_word_t app_wdf_data, app_rd_data;
  logic sw_library = 1'b0;
  logic [11:0] load_leds;
  logic loading;
  ma_state_t state_o;
  logic sd_req_valid, sd_req_ready, sd_byte_valid, sd_byte_ready;
  logic [31:0] sd_req_addr;
  logic [7:0] sd_byte;
  logic og_req_valid = 1'b0, og_req_ready, og_rd_valid, og_rd_ready = 1'b1;
  ddr_addr_t og_req_addr = '0;
  ddr_word_t og_rd_data;
  int checks = 0, failures = 0, early_reads = 0, led_steps = 0;

  memory_controller #(.NUM_IMAGES(NIMG)) dut (.*);

  sd_card_model #(.LATENCY(30)) sd (
    .clk(clk_sd), .rst(rst_sd), .req_valid(sd_req_valid), .req_ready(sd_req_ready),
    .req_addr(sd_req_addr), .byte_valid(sd_byte_valid), .byte_ready(sd_byte_ready),
    .byte_data(sd_byte));

  mig_model #(.READ_LAT(20), .STALL_PCT(10)) mig (.clk(clk_ui), .rst(rst_ui), .*);

  always #6.154 clk_ui = ~clk_ui;
  always #20 clk_sd = ~clk_sd;
  always #6.734 clk_pixel = ~clk_pixel;

  // no DDR read may be issued while the library is being loaded
  logic [11:0] leds_q = '0;
  always @(posedge clk_ui) begin
    if (!rst_ui && app_en && app_cmd == MIG_CMD_READ && loading) early_reads++;
    if (!rst_ui && load_leds != leds_q) begin led_steps++; leds_q <= load_leds; end
  end

  function automatic ddr_word_t lib_word(input int lib, input int img, input int k);
    ddr_word_t w;
    for (int j = 0; j < 16; j++)
      w[8*j +: 8] = sd_byte_at(32'(lib * NIMG * 512 + img * 512 + k * 16 + j));
    return w;
  endfunction

  task automatic check_ddr(input int lib);
    for (int i = 0; i < NIMG; i++)
      for (int k = 0; k < 32; k++) begin
        int unsigned idx;
        idx = 32'(i * 32 + k);
        checks++;
        if (!mig.mem.exists(idx) || mig.mem[idx] != lib_word(lib, i, k)) begin
          failures++;
          if (failures < 5) $display("FAIL library %0d image %0d word %0d", lib, i, k);
        end
      end
  endtask

  // issue n reads from the pixel domain and check the answers
  task automatic reads(input int n, input int lib);
    ddr_addr_t addrs [$];
    int got;
    got = 0;
    fork
      for (int r = 0; r < n; r++) begin
        ddr_addr_t a;
        a = DDR_ADDR_W'($urandom_range(NIMG * 32 - 1) * 16);
        addrs.push_back(a);
        @(negedge clk_pixel);
        og_req_valid = 1'b1; og_req_addr = a;
        @(posedge clk_pixel);
        while (!og_req_ready) @(posedge clk_pixel);
        @(negedge clk_pixel) og_req_valid = 1'b0;
      end
      while (got < n) begin
        @(posedge clk_pixel);
        if (og_rd_valid && og_rd_ready) begin
          checks++;
          if (og_rd_data != lib_word(lib, int'(addrs[got]) / 512, (int'(addrs[got]) % 512) / 16)) begin
            failures++; $display("FAIL read %0d at %h", got, addrs[got]);
          end
          got++;
        end
      end
    join
  endtask

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk_sd);
    rst_ui = 1'b0; rst_sd = 1'b0; rst_pixel = 1'b0;
    // reads requested during the load must wait for it
    repeat (200) @(posedge clk_ui);
    checks++;
    if (!loading) begin failures++; $display("FAIL not loading after reset"); end
    reads(6, 0);
    wait (!loading);
    check_ddr(0);
    checks++;
    if (load_leds != 12'hFFF || led_steps < 8) begin
      failures++; $display("FAIL leds %b after %0d steps", load_leds, led_steps);
    end
    reads(60, 0);
    // library switch
    sw_library = 1'b1;
    wait (loading);
    repeat (5) @(posedge clk_ui);
    checks++;
    if (load_leds == 12'hFFF) begin failures++; $display("FAIL leds not cleared on reload"); end
    wait (!loading);
    check_ddr(1);
    reads(60, 1);
    checks++;
    if (early_reads != 0 || sd.requests != 2 * NIMG || mig.cmd_stalls == 0 || mig.wdf_stalls == 0
        || mig.bad_writes != 0) begin
      failures++;
      $display("FAIL early=%0d sdreq=%0d stalls=%0d/%0d bad=%0d", early_reads, sd.requests,
               mig.cmd_stalls, mig.wdf_stalls, mig.bad_writes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
