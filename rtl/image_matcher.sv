// image_matcher: turns one 5x5 camera chunk into a library-image number.
//
// The photomosaic library is arranged as a colour space: for every RGB565
// colour there is one 16x16 library image that best represents it (chosen
// offline as the image of that average colour with the smallest spread). A
// chunk is therefore matched simply by averaging its red, green and blue
// channels separately; the averaged RGB565 colour is the image number.
//
// State machine:
//   IDLE   - wait for `start`; `start` comes with the chunk's first pixel.
//   ACCUM  - add the 25 pixels, one per clock on 25 consecutive clocks, into
//            three channel sums (the start cycle is the first of the 25).
//   DIVIDE - divide the three sums by 25 with three dividers in parallel;
//            this takes a data-dependent number of clocks (at most 64).
//   WRITE  - copy the three quotients into a separate result register and
//            write it, with the chunk's tile index, into the frame buffer.
// Only the finished colour reaches the frame buffer, never a partial one.
// While `pause` is high chunks are still consumed but nothing is written,
// which freezes the displayed mosaic (the rest of the pipeline runs on).
//
// Interface: `ready` is high in IDLE. `tile_index` is sampled with `start`.
// `fb_we` pulses for one clock with `fb_addr`/`fb_data`. Averages truncate
// (sum / 25, remainder dropped); the rounding is this design's choice.
module image_matcher
  import photomosaica_pkg::*;
#(
  parameter int unsigned FB_AW = 12
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             pause,
  input  logic             start,
  input  logic             pixel_valid,
  input  rgb565_t          pixel,
  input  logic [FB_AW-1:0] tile_index,
  output logic             ready,
  output logic             fb_we,
  output logic [FB_AW-1:0] fb_addr,
  output logic [15:0]      fb_data
);

  typedef enum logic [1:0] {S_IDLE, S_ACCUM, S_DIVIDE, S_WRITE} state_t;
  state_t state;

  localparam int unsigned SW = 11;  // 25 * 63 = 1575 fits in 11 bits

  logic [SW-1:0] sum_r, sum_g, sum_b;
  logic [4:0]    count;
  logic [FB_AW-1:0] index_q;
  logic          div_start;
  logic          busy_r, busy_g, busy_b;
  logic          done_r, done_g, done_b;
  logic          have_r, have_g, have_b;
  logic [SW-1:0] q_r, q_g, q_b, rem_r, rem_g, rem_b;
  rgb565_t       final_color;

  localparam logic [SW-1:0] DEN = SW'(CHUNK_PIXELS);

  divider #(.W(SW)) u_div_r (.clk, .rst, .start(div_start), .dividend(sum_r), .divisor(DEN),
                             .busy(busy_r), .done(done_r), .quotient(q_r), .remainder(rem_r));
  divider #(.W(SW)) u_div_g (.clk, .rst, .start(div_start), .dividend(sum_g), .divisor(DEN),
                             .busy(busy_g), .done(done_g), .quotient(q_g), .remainder(rem_g));
  divider #(.W(SW)) u_div_b (.clk, .rst, .start(div_start), .dividend(sum_b), .divisor(DEN),
                             .busy(busy_b), .done(done_b), .quotient(q_b), .remainder(rem_b));

  assign ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      sum_r       <= '0;
      sum_g       <= '0;
      sum_b       <= '0;
      count       <= '0;
      index_q     <= '0;
      div_start   <= 1'b0;
      have_r      <= 1'b0;
      have_g      <= 1'b0;
      have_b      <= 1'b0;
      final_color <= '0;
      fb_we       <= 1'b0;
      fb_addr     <= '0;
      fb_data     <= '0;
    end else begin
      div_start <= 1'b0;
      fb_we     <= 1'b0;
      unique case (state)
        S_IDLE: if (start && pixel_valid) begin
          sum_r   <= SW'(pixel.r);
          sum_g   <= SW'(pixel.g);
          sum_b   <= SW'(pixel.b);
          count   <= 5'd1;
          index_q <= tile_index;
          state   <= S_ACCUM;
        end
        S_ACCUM: if (pixel_valid) begin
          sum_r <= sum_r + SW'(pixel.r);
          sum_g <= sum_g + SW'(pixel.g);
          sum_b <= sum_b + SW'(pixel.b);
          count <= count + 1'b1;
          if (count == 5'(CHUNK_PIXELS - 1)) begin
            div_start <= 1'b1;
            have_r    <= 1'b0;
            have_g    <= 1'b0;
            have_b    <= 1'b0;
            state     <= S_DIVIDE;
          end
        end
        S_DIVIDE: begin
          if (done_r) have_r <= 1'b1;
          if (done_g) have_g <= 1'b1;
          if (done_b) have_b <= 1'b1;
          if ((have_r || done_r) && (have_g || done_g) && (have_b || done_b)) begin
            final_color <= '{r: q_r[4:0], g: q_g[5:0], b: q_b[4:0]};
            state       <= S_WRITE;
          end
        end
        S_WRITE: begin
          fb_we   <= !pause;
          fb_addr <= index_q;
          fb_data <= final_color;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
