// input_line_buffer: ten camera lines, filled and drained in halves of five.
//
// Camera line y is stored in line slot y mod 10, so lines 0-4 of every group
// of ten land in the lower half and lines 5-9 in the upper half. When the
// last pixel of a line with y mod 5 == 4 is written, a half has just become
// complete: `half_ready` pulses with `half` (which half) and `chunk_row`
// (y / 5, the row of 5x5 chunks it holds). The chunk reader then empties
// that half while the camera fills the other one. Ten lines and the
// five-line hand-over follow the design description; the slot arithmetic is
// this design's choice.
//
// Interface: the write port takes one pixel per `we` with its camera x and
// y. The read port takes a flat address (slot * CAM_W + x) and returns the
// pixel one clock later. One clock for both ports.
module input_line_buffer
  import photomosaica_pkg::*;
#(
  parameter int unsigned CAM_W = 320,
  parameter int unsigned CAM_H = 240,
  parameter int unsigned LINES = 10,
  localparam int unsigned XW = $clog2(CAM_W),
  localparam int unsigned YW = $clog2(CAM_H),
  localparam int unsigned DEPTH = LINES * CAM_W,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [XW-1:0] wx,
  input  logic [YW-1:0] wy,
  input  rgb565_t       wdata,
  input  logic [AW-1:0] raddr,
  output rgb565_t       rdata,
  output logic          half_ready,
  output logic          half,
  output logic [YW-1:0] chunk_row
);

  rgb565_t mem [DEPTH];

  logic [3:0]    slot;
  logic [AW-1:0] waddr;

  always_comb begin
    slot  = 4'(wy % YW'(LINES));
    waddr = AW'(slot) * AW'(CAM_W) + AW'(wx);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      half_ready <= 1'b0;
      half       <= 1'b0;
      chunk_row  <= '0;
    end else begin
      half_ready <= 1'b0;
      if (we && (32'(wx) == CAM_W - 1) && (32'(slot) % CHUNK == CHUNK - 1)) begin
        half_ready <= 1'b1;
        half       <= (32'(slot) >= CHUNK);
        chunk_row  <= YW'(wy / YW'(CHUNK));
      end
    end
  end

endmodule
