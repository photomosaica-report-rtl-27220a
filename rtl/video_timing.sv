// video_timing: raster counters and sync signals for the HDMI output.
//
// Counts pixels across each line and lines down each frame, and derives
// horizontal and vertical sync and the active-video flag from them. The
// defaults are the standard CEA-861 1280x720 at 60 Hz timing, which is what
// a 74.25 MHz pixel clock produces; the description gives only the pixel
// clock, the resolution is this design's reading of it. Syncs are active
// high, as that mode specifies.
//
// Interface: all outputs are registered and belong to the same pixel;
// `hcount`/`vcount` run over the whole raster, blanking included.
// `new_frame` pulses with pixel (0, 0).
module video_timing #(
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned H_FP     = 110,
  parameter int unsigned H_SYNC   = 40,
  parameter int unsigned H_BP     = 220,
  parameter int unsigned V_ACTIVE = 720,
  parameter int unsigned V_FP     = 5,
  parameter int unsigned V_SYNC   = 5,
  parameter int unsigned V_BP     = 20,
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP,
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP,
  localparam int unsigned HW = $clog2(H_TOTAL),
  localparam int unsigned VW = $clog2(V_TOTAL)
) (
  input  logic          clk,
  input  logic          rst,
  output logic [HW-1:0] hcount,
  output logic [VW-1:0] vcount,
  output logic          hsync,
  output logic          vsync,
  output logic          active,
  output logic          new_frame
);

  logic [HW-1:0] h_next;
  logic [VW-1:0] v_next;

  always_comb begin
    h_next = hcount + 1'b1;
    v_next = vcount;
    if (32'(hcount) == H_TOTAL - 1) begin
      h_next = '0;
      v_next = (32'(vcount) == V_TOTAL - 1) ? '0 : vcount + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount    <= '0;
      vcount    <= '0;
      hsync     <= 1'b0;
      vsync     <= 1'b0;
      active    <= 1'b1;
      new_frame <= 1'b1;
    end else begin
      hcount    <= h_next;
      vcount    <= v_next;
      hsync     <= (32'(h_next) >= H_ACTIVE + H_FP) && (32'(h_next) < H_ACTIVE + H_FP + H_SYNC);
      vsync     <= (32'(v_next) >= V_ACTIVE + V_FP) && (32'(v_next) < V_ACTIVE + V_FP + V_SYNC);
      active    <= (32'(h_next) < H_ACTIVE) && (32'(v_next) < V_ACTIVE);
      new_frame <= (h_next == '0) && (v_next == '0);
    end
  end

endmodule
