// tmds_encoder: DVI/HDMI transition-minimised encoding of one colour channel.
//
// During active video each 8-bit value becomes a 10-bit symbol in two steps:
// first the bits are chained with XOR or XNOR, whichever gives fewer
// transitions (bit 8 records which), then the word is sent inverted or not
// (bit 9 records which) so as to keep the running count of ones minus zeros
// near zero. During blanking one of the four control symbols is sent for
// the two control bits (hsync, vsync on the blue channel) and the running
// disparity is reset. This is the standard DVI 1.0 algorithm; the document
// only names the HDMI output.
//
// Timing: the symbol is registered, one clock after its inputs. Three of
// these, one per channel, feed a 10:1 serialiser outside this design.
module tmds_encoder (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic [1:0] ctrl,     // {c1, c0}
  input  logic       de,
  output logic [9:0] symbol
);

  logic [3:0]        n1_d, n1_q;
  logic              use_xnor;
  logic [7:0]        chain;
  logic [8:0]        q_m;
  logic signed [4:0] diff;     // ones - zeros of q_m[7:0], even, -8..8
  logic signed [4:0] cnt;

  always_comb begin
    n1_d = '0;
    for (int i = 0; i < 8; i++) n1_d += 4'(data[i]);
    use_xnor = (n1_d > 4'd4) || (n1_d == 4'd4 && !data[0]);
    chain = {7'b0, data[0]};
    for (int i = 1; i < 8; i++)
      chain[i] = use_xnor ? !(chain[i-1] ^ data[i]) : (chain[i-1] ^ data[i]);
    q_m = {!use_xnor, chain};
    n1_q = '0;
    for (int i = 0; i < 8; i++) n1_q += 4'(q_m[i]);
    diff = 5'(signed'({1'b0, n1_q})) * 5'sd2 - 5'sd8;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      symbol <= '0;
      cnt    <= '0;
    end else if (!de) begin
      cnt <= '0;
      unique case (ctrl)
        2'b00: symbol <= 10'b1101010100;
        2'b01: symbol <= 10'b0010101011;
        2'b10: symbol <= 10'b0101010100;
        2'b11: symbol <= 10'b1010101011;
      endcase
    end else if (cnt == 0 || diff == 0) begin
      symbol <= {!q_m[8], q_m[8], q_m[8] ? q_m[7:0] : ~q_m[7:0]};
      cnt    <= q_m[8] ? cnt + diff : cnt - diff;
    end else if ((cnt > 0 && diff > 0) || (cnt < 0 && diff < 0)) begin
      symbol <= {1'b1, q_m[8], ~q_m[7:0]};
      cnt    <= cnt + (q_m[8] ? 5'sd2 : 5'sd0) - diff;
    end else begin
      symbol <= {1'b0, q_m[8], q_m[7:0]};
      cnt    <= cnt - (q_m[8] ? 5'sd0 : 5'sd2) + diff;
    end
  end

endmodule
