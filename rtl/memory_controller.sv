// memory_controller: memory arbitration between the SD card, the DDR3
// memory interface and the graphics pipeline.
//
// After reset the controller copies the selected image library from the SD
// card into DDR3, one 512-byte SD block (one 16x16 image) at a time and 16
// bytes per DDR write. Once the whole library is in DDR3 it only serves the
// output generator's 16-byte read requests. Its state machine, clocked by
// the memory interface's user clock, has the numbered states of the design
// description:
//   0 reset      -> 6
//   6 SD request: ask the SD controller for the next block     -> 7
//   7 SD wait:    collect 16 bytes into saved_write_data        -> 1
//   1 write data: offer saved_write_data to the write-data FIFO -> 2
//   2 write cmd:  issue the write; then 7 if the image has more
//                 bytes, 6 if more images remain, else 3
//   3 idle:       wait for a read request                       -> 4
//   4 read cmd:   pass the request to the command FIFO          -> 3
//   5 unused
// Library switching: the SD byte address of image i is
// LIB_BASE * sw_library + 512 * i, library 1 starting right after the
// NUM_IMAGES images of library 0. When the (synchronised) library switch
// changes, the controller reloads the whole library from state 3; read
// requests wait in their FIFO meanwhile. SD bytes, SD requests, graphics
// requests and read data each cross their clock boundary through an async
// FIFO. A reload triggered from state 3 and the LED thermometer are this
// design's reading of the description; so is the little-endian packing
// (byte j of a 16-byte group lands in bits [8j+7:8j]).
//
// `load_leds` is a 12-LED thermometer of load progress: LED n is lit once
// (n+1)/12 of the library is loaded, all twelve when loading is complete.
//
// DDR side (MIG user interface, clk_ui): a command is taken when
// app_en && app_rdy; write data when app_wdf_wren && app_wdf_rdy (one
// 128-bit beat, app_wdf_end with it); read data return in order on
// app_rd_data_valid and cannot be stalled, so the read-data FIFO is sized
// for every request the output generator can have outstanding.
module memory_controller
  import photomosaica_pkg::*;
#(
  parameter int unsigned NUM_IMAGES = 65536,
  parameter int unsigned SD_ADDR_W  = 32,
  localparam int unsigned IW = $clog2(NUM_IMAGES + 1)
) (
  // MIG user interface
  input  logic                 clk_ui,
  input  logic                 rst_ui,
  output logic                 app_en,
  output logic [2:0]           app_cmd,
  output ddr_addr_t            app_addr,
  input  logic                 app_rdy,
  output ddr_word_t            app_wdf_data,
  output logic                 app_wdf_wren,
  output logic                 app_wdf_end,
  input  logic                 app_wdf_rdy,
  input  ddr_word_t            app_rd_data,
  input  logic                 app_rd_data_valid,
  input  logic                 sw_library,        // asynchronous switch
  output logic [11:0]          load_leds,
  output logic                 loading,
  output ma_state_t            state_o,

  // SD card controller side (clk_sd)
  input  logic                 clk_sd,
  input  logic                 rst_sd,
  output logic                 sd_req_valid,
  input  logic                 sd_req_ready,
  output logic [SD_ADDR_W-1:0] sd_req_addr,
  input  logic                 sd_byte_valid,
  output logic                 sd_byte_ready,
  input  logic [7:0]           sd_byte,

  // graphics side (clk_pixel)
  input  logic                 clk_pixel,
  input  logic                 rst_pixel,
  input  logic                 og_req_valid,
  output logic                 og_req_ready,
  input  ddr_addr_t            og_req_addr,
  output logic                 og_rd_valid,
  input  logic                 og_rd_ready,
  output ddr_word_t            og_rd_data
);

  localparam logic [SD_ADDR_W-1:0] LIB_BASE = SD_ADDR_W'(64'(NUM_IMAGES) * IMAGE_BYTES);

  ma_state_t state;
  assign state_o = state;

  // ---------------- clock-domain crossings
  logic                 sdq_valid, sdq_ready;
  logic [SD_ADDR_W-1:0] sdq_addr;
  logic                 sdb_valid, sdb_ready;
  logic [7:0]           sdb_data;
  logic                 ogq_valid, ogq_ready;
  ddr_addr_t            ogq_addr;
  logic                 rdf_ready;

  async_fifo #(.WIDTH(SD_ADDR_W), .ADDR_W(2)) u_sd_req_fifo (
    .wr_clk(clk_ui), .wr_rst(rst_ui), .wr_valid(sdq_valid), .wr_ready(sdq_ready), .wr_data(sdq_addr),
    .rd_clk(clk_sd), .rd_rst(rst_sd), .rd_valid(sd_req_valid), .rd_ready(sd_req_ready), .rd_data(sd_req_addr));

  async_fifo #(.WIDTH(8), .ADDR_W(5)) u_sd_data_fifo (
    .wr_clk(clk_sd), .wr_rst(rst_sd), .wr_valid(sd_byte_valid), .wr_ready(sd_byte_ready), .wr_data(sd_byte),
    .rd_clk(clk_ui), .rd_rst(rst_ui), .rd_valid(sdb_valid), .rd_ready(sdb_ready), .rd_data(sdb_data));

  async_fifo #(.WIDTH(DDR_ADDR_W), .ADDR_W(3)) u_og_req_fifo (
    .wr_clk(clk_pixel), .wr_rst(rst_pixel), .wr_valid(og_req_valid), .wr_ready(og_req_ready), .wr_data(og_req_addr),
    .rd_clk(clk_ui), .rd_rst(rst_ui), .rd_valid(ogq_valid), .rd_ready(ogq_ready), .rd_data(ogq_addr));

  async_fifo #(.WIDTH(DDR_WORD_BITS), .ADDR_W(6)) u_rd_data_fifo (
    .wr_clk(clk_ui), .wr_rst(rst_ui), .wr_valid(app_rd_data_valid), .wr_ready(rdf_ready), .wr_data(app_rd_data),
    .rd_clk(clk_pixel), .rd_rst(rst_pixel), .rd_valid(og_rd_valid), .rd_ready(og_rd_ready), .rd_data(og_rd_data));

  // ---------------- library switch synchroniser
  logic [1:0] sw_s;
  logic       lib_sel;        // library being (or last) loaded
  always_ff @(posedge clk_ui) begin
    if (rst_ui) sw_s <= '0;
    else        sw_s <= {sw_s[0], sw_library};
  end

  // ---------------- arbitration state machine
  logic [IW-1:0]  image;        // image being loaded
  logic [4:0]     chunk;        // 16-byte group within the image
  logic [3:0]     nbytes;       // bytes gathered into saved_write_data
  ddr_word_t      saved_write_data;
  ddr_addr_t      rd_addr_q;
  logic [IW-1:0]  loaded;       // images completely written to DDR

  assign sdq_valid    = (state == MA_SD_REQ);
  assign sdq_addr     = (lib_sel ? LIB_BASE : '0) + SD_ADDR_W'(64'(image) * IMAGE_BYTES);
  assign sdb_ready    = (state == MA_SD_WAIT);
  assign ogq_ready    = (state == MA_IDLE) && (sw_s[1] == lib_sel);
  assign app_wdf_wren = (state == MA_WDATA);
  assign app_wdf_end  = (state == MA_WDATA);
  assign app_wdf_data = saved_write_data;
  assign app_en       = (state == MA_WCMD) || (state == MA_RCMD);
  assign app_cmd      = (state == MA_RCMD) ? MIG_CMD_READ : MIG_CMD_WRITE;
  assign app_addr     = (state == MA_RCMD) ? rd_addr_q
                      : DDR_ADDR_W'(64'(image) * IMAGE_BYTES + 64'(chunk) * DDR_WORD_BYTES);
  assign loading      = (state != MA_IDLE) && (state != MA_RCMD);

  always_ff @(posedge clk_ui) begin
    if (rst_ui) begin
      state            <= MA_RESET;
      lib_sel          <= 1'b0;
      image            <= '0;
      chunk            <= '0;
      nbytes           <= '0;
      saved_write_data <= '0;
      rd_addr_q        <= '0;
      loaded           <= '0;
    end else begin
      unique case (state)
        MA_RESET: begin
          lib_sel <= sw_s[1];
          image   <= '0;
          chunk   <= '0;
          loaded  <= '0;
          state   <= MA_SD_REQ;
        end
        MA_SD_REQ: if (sdq_ready) begin
          nbytes <= '0;
          state  <= MA_SD_WAIT;
        end
        MA_SD_WAIT: if (sdb_valid) begin
          saved_write_data[8*nbytes +: 8] <= sdb_data;
          nbytes <= nbytes + 1'b1;
          if (nbytes == 4'd15) state <= MA_WDATA;
        end
        MA_WDATA: if (app_wdf_rdy) state <= MA_WCMD;
        MA_WCMD: if (app_rdy) begin
          if (chunk != 5'(WORDS_PER_IMAGE - 1)) begin
            chunk  <= chunk + 1'b1;
            nbytes <= '0;
            state  <= MA_SD_WAIT;
          end else begin
            chunk  <= '0;
            loaded <= image + 1'b1;
            if (32'(image) != NUM_IMAGES - 1) begin
              image <= image + 1'b1;
              state <= MA_SD_REQ;
            end else begin
              state <= MA_IDLE;
            end
          end
        end
        MA_IDLE: begin
          if (sw_s[1] != lib_sel) begin
            state <= MA_RESET;            // library switch: reload
          end else if (ogq_valid) begin
            rd_addr_q <= ogq_addr;
            state     <= MA_RCMD;
          end
        end
        MA_RCMD: if (app_rdy) state <= MA_IDLE;
        default: state <= MA_RESET;
      endcase
    end
  end

  // ---------------- load-progress thermometer
  always_ff @(posedge clk_ui) begin
    if (rst_ui) load_leds <= '0;
    else
      for (int n = 0; n < 12; n++)
        load_leds[n] <= (64'(loaded) * 12 >= 64'(n + 1) * NUM_IMAGES);
  end

  // ---------------- protocol checks
  always_ff @(posedge clk_ui) begin
    if (!rst_ui) begin
      assert (!app_rd_data_valid || rdf_ready)
        else $error("memory_controller: read data arrived with the read-data FIFO full");
    end
  end

endmodule
