// async_fifo: dual-clock first-in first-out buffer for clock-domain crossings.
//
// Every crossing between the memory controller (MIG clock), the SD card
// controller (25 MHz) and the graphics pipeline (pixel clock) goes through
// one of these. The design description uses vendor AXI-stream FIFOs there;
// this is a plain, vendor-neutral equivalent. Read and write pointers are
// kept in binary and in Gray code; each Gray pointer crosses to the other
// domain through a two-flop synchroniser, so `full` and `empty` are
// conservative (they clear a few clocks late, never early).
//
// Interface: valid/ready on both sides. The write side accepts `wr_data` when
// `wr_valid && wr_ready`. The read side is first-word-fall-through: `rd_data`
// is the oldest entry whenever `rd_valid` is high and is consumed when
// `rd_valid && rd_ready`. DEPTH is 2**ADDR_W entries. Each side has its own
// synchronous active-high reset; both must be applied together at start-up.
module async_fifo #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned ADDR_W = 4
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,

  input  logic             rd_clk,
  input  logic             rd_rst,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [ADDR_W:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [ADDR_W:0] rd_gray_w1, rd_gray_w2;   // read pointer seen by writer
  logic [ADDR_W:0] wr_gray_r1, wr_gray_r2;   // write pointer seen by reader

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side
  logic [ADDR_W:0] wr_bin_next;
  assign wr_bin_next = wr_bin + 1'b1;
  assign wr_ready = (wr_gray != {~rd_gray_w2[ADDR_W:ADDR_W-1], rd_gray_w2[ADDR_W-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_valid && wr_ready) mem[wr_bin[ADDR_W-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_w1 <= '0;
      rd_gray_w2 <= '0;
    end else begin
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
      if (wr_valid && wr_ready) begin
        wr_bin  <= wr_bin_next;
        wr_gray <= bin2gray(wr_bin_next);
      end
    end
  end

  // ---------------- read side
  logic [ADDR_W:0] rd_bin_next;
  assign rd_bin_next = rd_bin + 1'b1;
  assign rd_valid = (rd_gray != wr_gray_r2);
  assign rd_data  = mem[rd_bin[ADDR_W-1:0]];

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_r1 <= '0;
      wr_gray_r2 <= '0;
    end else begin
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
      if (rd_valid && rd_ready) begin
        rd_bin  <= rd_bin_next;
        rd_gray <= bin2gray(rd_bin_next);
      end
    end
  end

  initial begin
    assert (ADDR_W >= 2) else $error("async_fifo: ADDR_W must be at least 2");
  end

endmodule
