// output_generator: fetches the next row of library images into the
// output line buffer, just in time for the display.
//
// Whenever the display reaches a line that is a multiple of 16 (at hcount
// 0), the tile row shown before has been fully scanned out, so its half of
// the output line buffer is free and is refilled with the row after the one
// now being shown. On line 16*ROWS, in vertical blanking, row 0 of the next
// frame is fetched; on line 16*(ROWS-1) nothing is fetched.
//
// Two linked state machines do the work for each of the TILES_X images in
// the row:
//   request side - reads the image number from the frame buffer, then issues
//                  the 32 read requests of the image (512 bytes, 16 bytes
//                  each, at byte address number*512 + 16*k);
//   data side    - writes each 128-bit response into the line buffer: reply
//                  k is line k/2, pixels 8*(k mod 2) .. +7 of the tile.
// When one side has finished an image it waits for the other, and both then
// move to the next image together. A line trigger that arrives while a row
// is still being fetched is ignored and reported on `overrun`.
//
// Interface: frame-buffer read data arrive one clock after `fb_raddr`.
// Requests are valid/ready; responses come back in order, valid/ready, with
// `rd_ready` high whenever the data side expects data. `row_done` pulses
// when a whole row has been written.
module output_generator
  import photomosaica_pkg::*;
#(
  parameter int unsigned TILES_X = 64,   // library images per row
  parameter int unsigned TILES_Y = 48,   // rows held in the frame buffer
  parameter int unsigned ROWS    = 45,   // rows shown on screen
  parameter int unsigned HW      = 11,   // hcount width
  parameter int unsigned VW      = 10,   // vcount width
  localparam int unsigned FB_AW  = $clog2(TILES_X * TILES_Y),
  localparam int unsigned WW     = $clog2(TILES_X * 2),
  localparam int unsigned OLB_AW = 1 + 4 + WW
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [HW-1:0]     hcount,
  input  logic [VW-1:0]     vcount,
  // frame buffer
  output logic [FB_AW-1:0]  fb_raddr,
  input  logic [15:0]       fb_rdata,
  // read requests to the memory controller
  output logic              req_valid,
  input  logic              req_ready,
  output ddr_addr_t         req_addr,
  // read responses
  input  logic              rd_valid,
  output logic              rd_ready,
  input  ddr_word_t         rd_data,
  // output line buffer write port
  output logic              olb_we,
  output logic [OLB_AW-1:0] olb_waddr,
  output ddr_word_t         olb_wdata,
  // status
  output logic              busy,
  output logic              row_done,
  output logic              overrun
);

  typedef enum logic [2:0] {A_IDLE, A_FB, A_BASE, A_REQ, A_SYNC} a_state_t;
  typedef enum logic [1:0] {B_IDLE, B_RECV, B_SYNC} b_state_t;
  a_state_t a_state;
  b_state_t b_state;

  localparam int unsigned TW = $clog2(TILES_X);
  localparam int unsigned RW = $clog2(TILES_Y);

  logic [RW-1:0] row;
  logic          half;
  logic [TW-1:0] tile;
  logic [4:0]    a_k, b_k;
  logic [15:0]   image;

  // Which row, if any, this line asks for.
  logic          trigger;
  logic          fill;
  logic [RW-1:0] fill_row;
  logic [VW-5:0] k_line;

  always_comb begin
    k_line   = vcount[VW-1:4];
    trigger  = (hcount == '0) && (vcount[3:0] == 4'd0);
    fill     = 1'b0;
    fill_row = '0;
    if (32'(k_line) + 1 < ROWS) begin
      fill     = 1'b1;
      fill_row = RW'(32'(k_line) + 1);
    end else if (32'(k_line) == ROWS) begin
      fill     = 1'b1;
      fill_row = '0;
    end
  end

  assign busy      = (a_state != A_IDLE) || (b_state != B_IDLE);
  assign fb_raddr  = FB_AW'(32'(row) * TILES_X + 32'(tile));
  assign req_valid = (a_state == A_REQ);
  assign req_addr  = DDR_ADDR_W'({image, 9'd0}) + DDR_ADDR_W'({a_k, 4'd0});
  assign rd_ready  = (b_state == B_RECV);

  logic both_sync;
  assign both_sync = (a_state == A_SYNC) && (b_state == B_SYNC);

  always_ff @(posedge clk) begin
    if (rst) begin
      a_state   <= A_IDLE;
      b_state   <= B_IDLE;
      row       <= '0;
      half      <= 1'b0;
      tile      <= '0;
      a_k       <= '0;
      b_k       <= '0;
      image     <= '0;
      olb_we    <= 1'b0;
      olb_waddr <= '0;
      olb_wdata <= '0;
      row_done  <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      olb_we   <= 1'b0;
      row_done <= 1'b0;
      overrun  <= 1'b0;

      if (trigger && fill) begin
        if (busy) begin
          overrun <= 1'b1;
        end else begin
          row     <= fill_row;
          half    <= fill_row[0];
          tile    <= '0;
          a_state <= A_FB;
          b_state <= B_RECV;
          b_k     <= '0;
        end
      end

      // ---------------- request side
      unique case (a_state)
        A_IDLE: ;
        A_FB:   a_state <= A_BASE;           // frame-buffer read in flight
        A_BASE: begin
          image   <= fb_rdata;
          a_k     <= '0;
          a_state <= A_REQ;
        end
        A_REQ: if (req_ready) begin
          if (a_k == 5'(WORDS_PER_IMAGE - 1)) a_state <= A_SYNC;
          else a_k <= a_k + 1'b1;
        end
        A_SYNC: ;
        default: a_state <= A_IDLE;
      endcase

      // ---------------- data side
      unique case (b_state)
        B_IDLE: ;
        B_RECV: if (rd_valid) begin
          olb_we    <= 1'b1;
          olb_waddr <= {half, b_k[4:1], WW'(32'(tile) * 2 + 32'(b_k[0]))};
          olb_wdata <= rd_data;
          if (b_k == 5'(WORDS_PER_IMAGE - 1)) b_state <= B_SYNC;
          b_k <= b_k + 1'b1;
        end
        B_SYNC: ;
        default: b_state <= B_IDLE;
      endcase

      // ---------------- both sides done with this image
      if (both_sync) begin
        if (32'(tile) == TILES_X - 1) begin
          a_state  <= A_IDLE;
          b_state  <= B_IDLE;
          row_done <= 1'b1;
        end else begin
          tile    <= tile + 1'b1;
          a_state <= A_FB;
          b_state <= B_RECV;
          b_k     <= '0;
        end
      end
    end
  end

endmodule
