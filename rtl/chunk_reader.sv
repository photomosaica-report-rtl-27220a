// chunk_reader: walks the 5x5 chunks of a full input-line-buffer half.
//
// On `half_ready` it reads the chunks of that half left to right. For each
// chunk it waits until the image matcher is idle, then reads the 25 pixels
// row by row from the line buffer, one per clock, and hands them to the
// matcher on 25 consecutive clocks, the first one flagged with `start` and
// the chunk's frame-buffer index (chunk_row * TILES_X + column). A half that
// becomes ready while the previous one is still being read is remembered
// (one deep) and read next; a third one is dropped and flagged on
// `overrun`. The walk order and the one-deep queue are this design's choice.
//
// Timing: line-buffer reads take one clock, so `start`/`pixel_valid` trail
// the read addresses by one clock.
module chunk_reader
  import photomosaica_pkg::*;
#(
  parameter int unsigned CAM_W = 320,
  parameter int unsigned CAM_H = 240,
  parameter int unsigned LINES = 10,
  localparam int unsigned TILES_X = CAM_W / CHUNK,
  localparam int unsigned TILES_Y = CAM_H / CHUNK,
  localparam int unsigned YW = $clog2(CAM_H),
  localparam int unsigned AW = $clog2(LINES * CAM_W),
  localparam int unsigned FB_AW = $clog2(TILES_X * TILES_Y)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             half_ready,
  input  logic             half,
  input  logic [YW-1:0]    chunk_row,
  output logic [AW-1:0]    ilb_raddr,
  input  rgb565_t          ilb_rdata,
  input  logic             matcher_ready,
  output logic             start,
  output logic             pixel_valid,
  output rgb565_t          pixel,
  output logic [FB_AW-1:0] tile_index,
  output logic             overrun
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_READ, S_DRAIN} state_t;
  state_t state;

  localparam int unsigned CW = $clog2(TILES_X + 1);

  logic            cur_half, pend_half, pend;
  logic [YW-1:0]   cur_row, pend_row;
  logic [CW-1:0]   col;
  logic [2:0]      px, py;
  logic            rd_issue, rd_first;
  logic            issue_q, first_q;
  logic [FB_AW-1:0] idx_q;

  // Read address of pixel (px, py) of chunk `col` in half `cur_half`.
  always_comb begin
    ilb_raddr = AW'((32'(cur_half) * CHUNK + 32'(py)) * CAM_W + 32'(col) * CHUNK + 32'(px));
    rd_issue  = (state == S_READ);
    rd_first  = (state == S_READ) && (px == 3'd0) && (py == 3'd0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      cur_half  <= 1'b0;
      cur_row   <= '0;
      pend      <= 1'b0;
      pend_half <= 1'b0;
      pend_row  <= '0;
      col       <= '0;
      px        <= '0;
      py        <= '0;
      issue_q   <= 1'b0;
      first_q   <= 1'b0;
      idx_q     <= '0;
      overrun   <= 1'b0;
    end else begin
      issue_q <= rd_issue;
      first_q <= rd_first;
      idx_q   <= FB_AW'(32'(cur_row) * TILES_X + 32'(col));
      overrun <= 1'b0;

      // Remember a half that arrives while busy.
      if (half_ready && state != S_IDLE) begin
        if (pend) overrun <= 1'b1;
        pend      <= 1'b1;
        pend_half <= half;
        pend_row  <= chunk_row;
      end

      unique case (state)
        S_IDLE: begin
          if (half_ready) begin
            cur_half <= half;
            cur_row  <= chunk_row;
            col      <= '0;
            state    <= S_WAIT;
          end else if (pend) begin
            pend     <= 1'b0;
            cur_half <= pend_half;
            cur_row  <= pend_row;
            col      <= '0;
            state    <= S_WAIT;
          end
        end
        S_WAIT: if (matcher_ready) begin
          px    <= '0;
          py    <= '0;
          state <= S_READ;
        end
        S_READ: begin
          if (px == 3'(CHUNK - 1)) begin
            px <= '0;
            if (py == 3'(CHUNK - 1)) begin
              py    <= '0;
              state <= S_DRAIN;
            end else begin
              py <= py + 1'b1;
            end
          end else begin
            px <= px + 1'b1;
          end
        end
        S_DRAIN: begin
          // The matcher has seen `start` by now and is busy.
          if (32'(col) == TILES_X - 1) begin
            state <= S_IDLE;
          end else begin
            col   <= col + 1'b1;
            state <= S_WAIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign start       = issue_q && first_q;
  assign pixel_valid = issue_q;
  assign pixel       = ilb_rdata;
  assign tile_index  = idx_q;

endmodule
