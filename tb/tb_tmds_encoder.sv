// tb_tmds_encoder: sends runs of random and constant bytes separated by
// blanking. Every data symbol is decoded with the DVI decoding rule and
// compared with the byte sent; the running ones-minus-zeros count of the
// symbols is checked to stay bounded; the four control symbols and one
// known code (0x00 from zero disparity -> 0x100) are checked.
module tb_tmds_encoder;
  logic clk = 1'b0, rst = 1'b1, de = 1'b0;
  logic [7:0] data = '0;
  logic [1:0] ctrl = '0;
  logic [9:0] symbol;
  int checks = 0, failures = 0;
  logic [9:0] ctrl_sym [4] = '{10'b1101010100, 10'b0010101011, 10'b0101010100, 10'b1010101011};

  tmds_encoder dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] decode(input logic [9:0] s);
    logic [7:0] d, o;
    d = s[9] ? ~s[7:0] : s[7:0];
    o[0] = d[0];
    for (int i = 1; i < 8; i++) o[i] = s[8] ? (d[i] ^ d[i-1]) : !(d[i] ^ d[i-1]);
    return o;
  endfunction

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sent;
    logic was_de;
    int disp, maxd;
    disp = 0; maxd = 0;
    repeat (3) @(negedge clk); rst = 1'b0;
    // known code right after blanking
    de = 1'b0; ctrl = 2'b00; @(negedge clk);
    de = 1'b1; data = 8'h00; @(negedge clk);
    checks++;
    if (symbol != 10'h100) begin failures++; $display("FAIL 0x00 -> %b", symbol); end
    for (int run = 0; run < 200; run++) begin
      // blanking with a random control pair
      de = 1'b0; ctrl = 2'($urandom); @(negedge clk);
      checks++;
      if (symbol != ctrl_sym[ctrl]) begin failures++; $display("FAIL control %0d -> %b", ctrl, symbol); end
      disp = 0;
      for (int i = 0; i < 64; i++) begin
        de = 1'b1;
        data = (run % 4 == 0) ? 8'(run) : 8'($urandom);
        sent = data;
        @(negedge clk);
        checks++;
        if (decode(symbol) != sent) begin
          failures++; $display("FAIL %h -> %b decodes to %h", sent, symbol, decode(symbol));
        end
        disp += 2 * $countones(symbol) - 10;
        if (disp > maxd) maxd = disp;
        if (-disp > maxd) maxd = -disp;
      end
    end
    checks++;
    if (maxd > 20) begin failures++; $display("FAIL running disparity reached %0d", maxd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
