// tb_photomosaica_pkg: reference functions shared by the testbenches.
//
// sd_byte_at(a)       - content of the SD card at byte address a (a hash, so
//                       every image and every library differ);
// cam_pixel(x, y, p)  - the RGB565 camera picture for pattern p; red is kept
//                       0 and green below 8, so every chunk average is an
//                       image number below 256 and a 256-image library
//                       suffices in reduced-size runs;
// chunk_image(...)    - image number expected for a 5x5 chunk, computed by
//                       plain averaging (independent of the RTL);
// lib_pixel(...)      - pixel (row, col) of image n of a library;
// pad(p)              - RGB565 to 24-bit by appending zeros.
package tb_photomosaica_pkg;

  function automatic logic [7:0] sd_byte_at(input logic [31:0] a);
    logic [31:0] h;
    h = (a + 32'h1234_5677) * 32'h9E37_79B1;
    return h[31:24] ^ h[15:8];
  endfunction

  function automatic logic [15:0] cam_pixel(input int x, input int y, input int p);
    logic [5:0] g;
    logic [4:0] b;
    g = 6'(((x + 2 * y) / 3 + p * 3) % 8);
    b = 5'((x * 3 + y * 7 + p * 11) % 32);
    if (p >= 100) return {5'((x / 7 + y / 5 + p) % 32), 6'((x + y) % 64), b};
    return {5'd0, g, b};
  endfunction

  function automatic logic [15:0] chunk_image(input int cx, input int cy, input int p);
    int sr, sg, sb;
    logic [15:0] px;
    sr = 0; sg = 0; sb = 0;
    for (int dy = 0; dy < 5; dy++)
      for (int dx = 0; dx < 5; dx++) begin
        px = cam_pixel(cx * 5 + dx, cy * 5 + dy, p);
        sr += int'(px[15:11]);
        sg += int'(px[10:5]);
        sb += int'(px[4:0]);
      end
    return {5'(sr / 25), 6'(sg / 25), 5'(sb / 25)};
  endfunction

  function automatic logic [15:0] lib_pixel(input logic [31:0] lib_base, input int n,
                                            input int row, input int col);
    logic [31:0] a;
    a = lib_base + 32'(n) * 512 + 32'((row * 16 + col) * 2);
    return {sd_byte_at(a + 1), sd_byte_at(a)};
  endfunction

  function automatic logic [23:0] pad(input logic [15:0] p);
    return {p[15:11], 3'b000, p[10:5], 2'b00, p[4:0], 3'b000};
  endfunction

endpackage
