// photomosaica_pkg: types and constants shared by the photomosaic pipeline.
//
// Pixels travel as RGB565 (5 bits red, 6 green, 5 blue), the camera's own
// format. A library image is a 16x16 tile of RGB565 pixels, 512 bytes, and
// the library holds one image for every RGB565 colour, so the 16-bit average
// colour of a 5x5 camera chunk is directly the number of the image that
// represents it. DDR words are 128 bits, i.e. 8 pixels; pixel p of a word
// sits in bits [16p+15:16p] (little-endian, this design's choice).
package photomosaica_pkg;

  typedef struct packed {
    logic [4:0] r;
    logic [5:0] g;
    logic [4:0] b;
  } rgb565_t;

  localparam int unsigned CHUNK          = 5;    // camera chunk edge, pixels
  localparam int unsigned CHUNK_PIXELS   = CHUNK * CHUNK;
  localparam int unsigned TILE           = 16;   // library image edge, pixels
  localparam int unsigned IMAGE_BYTES    = 512;  // one library image
  localparam int unsigned DDR_WORD_BITS  = 128;  // MIG user-interface word
  localparam int unsigned DDR_WORD_BYTES = DDR_WORD_BITS / 8;
  localparam int unsigned PIX_PER_WORD   = DDR_WORD_BITS / 16;
  localparam int unsigned WORDS_PER_IMAGE = IMAGE_BYTES / DDR_WORD_BYTES; // 32
  localparam int unsigned DDR_ADDR_W     = 28;   // byte address, 256 MB DDR3

  typedef logic [DDR_ADDR_W-1:0] ddr_addr_t;
  typedef logic [DDR_WORD_BITS-1:0] ddr_word_t;

  // Memory-arbitration states, numbered as in the design description.
  typedef enum logic [2:0] {
    MA_RESET    = 3'd0,  // after reset, go load the library
    MA_WDATA    = 3'd1,  // push saved_write_data into the MIG write-data FIFO
    MA_WCMD     = 3'd2,  // issue the write command
    MA_IDLE     = 3'd3,  // wait for a read request from the output generator
    MA_RCMD     = 3'd4,  // pass the read request to the MIG command FIFO
    MA_UNUSED   = 3'd5,
    MA_SD_REQ   = 3'd6,  // request one 512-byte block from the SD card
    MA_SD_WAIT  = 3'd7   // gather 16 bytes into saved_write_data
  } ma_state_t;

  // MIG user-interface command codes.
  localparam logic [2:0] MIG_CMD_WRITE = 3'b000;
  localparam logic [2:0] MIG_CMD_READ  = 3'b001;

endpackage
