// camera_capture: OV7670 parallel video into RGB565 pixels with coordinates.
//
// The camera drives PCLK, HREF (line valid), VSYNC (frame sync, high between
// frames) and an 8-bit data bus, sending each RGB565 pixel as two bytes,
// high byte first. All camera inputs are passed through two flip-flops into
// the system clock domain, which must run at least three times faster than
// PCLK, and a PCLK rising edge is detected there; data and PCLK share the
// same delay, so the byte sampled is the one the camera held at its edge.
// Every second byte of a line completes a pixel, which is emitted with its x
// and y. HREF falling advances y; VSYNC resets it. Pixels beyond CAM_W x
// CAM_H are not emitted. The camera output format (RGB565, 320x240) follows
// the design description; the synchroniser scheme is this design's choice.
//
// Interface: `pixel_valid` pulses for one clock with `pixel`, `x`, `y`.
// `frame_done` pulses when VSYNC rises after a frame.
module camera_capture
  import photomosaica_pkg::*;
#(
  parameter int unsigned CAM_W = 320,
  parameter int unsigned CAM_H = 240,
  localparam int unsigned XW = $clog2(CAM_W),
  localparam int unsigned YW = $clog2(CAM_H)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cam_pclk,
  input  logic          cam_href,
  input  logic          cam_vsync,
  input  logic [7:0]    cam_data,
  output logic          pixel_valid,
  output rgb565_t       pixel,
  output logic [XW-1:0] x,
  output logic [YW-1:0] y,
  output logic          frame_done
);

  logic [2:0]  pclk_s;          // two sync stages plus edge history
  logic [1:0]  href_s, vsync_s;
  logic [7:0]  data_s1, data_s2;
  logic        href_q, vsync_q;
  logic        byte_phase;
  logic [7:0]  hi_byte;
  logic [XW:0] xc;
  logic [YW:0] yc;

  logic pclk_rise;
  assign pclk_rise = pclk_s[1] && !pclk_s[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      pclk_s  <= '0;
      href_s  <= '0;
      vsync_s <= '0;
      data_s1 <= '0;
      data_s2 <= '0;
    end else begin
      pclk_s  <= {pclk_s[1:0], cam_pclk};
      href_s  <= {href_s[0], cam_href};
      vsync_s <= {vsync_s[0], cam_vsync};
      data_s1 <= cam_data;
      data_s2 <= data_s1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      href_q      <= 1'b0;
      vsync_q     <= 1'b0;
      byte_phase  <= 1'b0;
      hi_byte     <= '0;
      xc          <= '0;
      yc          <= '0;
      pixel_valid <= 1'b0;
      pixel       <= '0;
      x           <= '0;
      y           <= '0;
      frame_done  <= 1'b0;
    end else begin
      pixel_valid <= 1'b0;
      frame_done  <= 1'b0;
      if (pclk_rise) begin
        href_q  <= href_s[1];
        vsync_q <= vsync_s[1];
        if (vsync_s[1]) begin
          xc         <= '0;
          yc         <= '0;
          byte_phase <= 1'b0;
          if (!vsync_q) frame_done <= 1'b1;
        end else if (href_s[1]) begin
          byte_phase <= !byte_phase;
          if (!byte_phase) begin
            hi_byte <= data_s2;
          end else begin
            if (32'(xc) < CAM_W && 32'(yc) < CAM_H) begin
              pixel_valid <= 1'b1;
              pixel       <= rgb565_t'({hi_byte, data_s2});
              x           <= XW'(xc);
              y           <= YW'(yc);
            end
            xc <= xc + 1'b1;
          end
        end else begin
          byte_phase <= 1'b0;
          xc         <= '0;
          if (href_q) yc <= yc + 1'b1;
        end
      end
    end
  end

endmodule
