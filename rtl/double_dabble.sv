// double_dabble: combinational binary-to-BCD converter (shift and add 3).
//
// The binary value is shifted, most significant bit first, into a scratch
// register of DIGITS BCD digits. Before every one-bit left shift each digit
// that is greater than 4 is incremented by 3, so that a digit of 5 or more
// carries into the next digit when it is doubled. After BIN_W iterations the
// scratch register holds the value in BCD. The loop is unrolled into BIN_W
// rows of add-3 correctors, one per iteration, with no clock.
//
// The algorithm is the one published for the multiplier; the unrolled,
// combinational form and the digit count are this design's choices. DIGITS
// defaults to the number of digits the largest BIN_W-bit value needs. With
// fewer digits the output is the value modulo 10^DIGITS, since a digit never
// depends on the digits above it.
//
// Interface: bin (BIN_W bits) in, bcd (4*DIGITS bits, digit 0 in bits 3:0) out.
module double_dabble
  import bcd_kom_pkg::*;
#(
  parameter int unsigned BIN_W  = 16,
  parameter int unsigned DIGITS = bcd_digits(BIN_W)
) (
  input  logic [BIN_W-1:0]      bin,
  output logic [4*DIGITS-1:0]   bcd
);

  logic [4*DIGITS-1:0] scratch;

  always_comb begin
    scratch = '0;
    for (int i = BIN_W - 1; i >= 0; i--) begin
      for (int d = 0; d < DIGITS; d++) begin
        if (scratch[4*d +: 4] > 4'd4)
          scratch[4*d +: 4] = scratch[4*d +: 4] + 4'd3;
      end
      scratch = {scratch[4*DIGITS-2:0], bin[i]};
    end
  end

  assign bcd = scratch;

endmodule
