// divider: multi-cycle unsigned division by repeated subtraction.
//
// The image matcher needs each colour sum of a 5x5 chunk divided by 25. The
// sums are small (at most 25*63 = 1575, eleven bits), so the simplest
// divider that fits is used: every clock the divisor is subtracted from the
// running remainder while the remainder is still at least the divisor, and
// the quotient counts the subtractions. The cycle count therefore depends on
// the operands (quotient + 1 clocks after start), which matches the
// description of a division step that takes a variable but short time. How
// the division is done inside is this design's choice.
//
// Interface: pulse `start` with `dividend`/`divisor`; `busy` is high while
// working; `done` pulses for one clock when `quotient`/`remainder` are valid
// and they then hold until the next start. A zero divisor gives an all-ones
// quotient and the dividend as remainder, one clock after start.
module divider #(
  parameter int unsigned W = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  logic [W-1:0] den;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      quotient  <= '0;
      remainder <= '0;
      den       <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy      <= 1'b1;
        quotient  <= '0;
        remainder <= dividend;
        den       <= divisor;
      end else if (busy) begin
        if (den == '0) begin
          quotient <= '1;
          busy     <= 1'b0;
          done     <= 1'b1;
        end else if (remainder >= den) begin
          remainder <= remainder - den;
          quotient  <= quotient + 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
