// sd_card_model: behavioural model of the SD card and its controller.
//
// Accepts one block request (a byte address) at a time; after LATENCY
// clocks it streams the 512 bytes of the block, one per clock while
// byte_ready is high. Contents come from tb_photomosaica_pkg::sd_byte_at.
// Counts requests in `requests`.
module sd_card_model #(
  parameter int LATENCY = 20
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_addr,
  output logic        byte_valid,
  input  logic        byte_ready,
  output logic [7:0]  byte_data
);
  import tb_photomosaica_pkg::*;

  int          requests;
  logic [31:0] addr;
  int          wait_cnt, sent;
  logic        busy;

  assign req_ready  = !busy && !rst;
  assign byte_valid = busy && (wait_cnt == 0);
  assign byte_data  = sd_byte_at(addr + 32'(sent));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      requests <= 0;
      wait_cnt <= 0;
      sent     <= 0;
      addr     <= '0;
    end else if (!busy) begin
      if (req_valid) begin
        busy     <= 1'b1;
        addr     <= req_addr;
        wait_cnt <= LATENCY;
        sent     <= 0;
        requests <= requests + 1;
      end
    end else if (wait_cnt != 0) begin
      wait_cnt <= wait_cnt - 1;
    end else if (byte_ready) begin
      if (sent == 511) busy <= 1'b0;
      sent <= sent + 1;
    end
  end
endmodule
