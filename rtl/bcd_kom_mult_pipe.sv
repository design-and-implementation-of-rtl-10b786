// bcd_kom_mult_pipe: pipelined W x W multiplier built on the Karatsuba-Ofman
// algorithm, delivering the product both in binary (z) and in BCD (y).
//
// The datapath is cut into seven register stages, one new operand pair can
// enter every clock and each result appears LATENCY = 7 clocks after its
// operands were sampled:
//   1  operand registers                   a, b
//   2  split and pre-add                   AH, AL, BH, BL, AH+AL, BH+BL
//   3  sub-multipliers (kom_mult)          P1 = AH*BH, P0 = AL*BL,
//                                          P2 = (AH+AL)*(BH+BL)
//   4  2L-bit adder and concatenation      S = P1+P0, C = 2^(2L)*P1 + P0
//   5  3L-bit adder                        T = C + 2^L*P2
//   6  3L-bit subtraction                  Z = T - 2^L*S  (binary product)
//   7  binary-to-BCD (double_dabble)       y = BCD(Z), z = Z
// Stages 3 to 6 follow the reordered Karatsuba-Ofman equation
// P = 2^(2L)P1 + P0 - 2^L(P1+P0) + 2^L P2, whose critical path is one
// half-width multiplier, one 2L-bit adder, one 3L-bit adder and one 3L-bit
// subtraction; each of those gets its own stage here. The seven-stage count
// matches the seven pipeline stages reported for the 8x8 multiplier; the exact
// placement of the registers is this design's choice. The radix of the split is
// 2^L (L = W/2) because the operands are binary.
//
// y carries Y_DIGITS BCD digits (digit 0 in y[3:0]); y_ovf is set when the
// product has more decimal digits than that (for W = 8, products above 9999),
// in which case y holds the product modulo 10^Y_DIGITS. z is always exact.
//
// Control, all of it this design's own choice: in_valid travels with the data
// and comes out as out_valid; rst_n (synchronous, active low) clears only the
// valid pipeline, the data registers are not reset. There is no stall: the
// pipeline advances on every rising edge of clk.
module bcd_kom_mult_pipe
  import bcd_kom_pkg::*;
#(
  parameter int unsigned W        = 8,
  parameter int unsigned Y_DIGITS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [W-1:0]          a,
  input  logic [W-1:0]          b,
  output logic                  out_valid,
  output logic [4*Y_DIGITS-1:0] y,
  output logic                  y_ovf,
  output logic [2*W-1:0]        z
);

  localparam int unsigned LATENCY = 7;
  localparam int unsigned L       = W / 2;          // low half width
  localparam int unsigned HW      = W - L;          // high half width
  localparam int unsigned SW      = HW + 1;         // width of AH+AL
  localparam int unsigned PW      = 2 * W;          // product width
  localparam int unsigned RW      = 2 * W + 1;      // recombination width
  localparam int unsigned DD      = bcd_digits(PW); // digits of any product

  if (W < 2) begin : g_bad_w
    $error("bcd_kom_mult_pipe: W must be at least 2");
  end
  if (Y_DIGITS < 1 || Y_DIGITS > DD) begin : g_bad_digits
    $error("bcd_kom_mult_pipe: Y_DIGITS must be between 1 and the digits of a product");
  end

  // Valid pipeline.
  logic [LATENCY-1:0] vld;

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end

  assign out_valid = vld[LATENCY-1];

  // Stage 1: operand registers.
  logic [W-1:0] a1, b1;

  always_ff @(posedge clk) begin
    a1 <= a;
    b1 <= b;
  end

  // Stage 2: split and pre-add.
  logic [HW-1:0] ah2, bh2;
  logic [L-1:0]  al2, bl2;
  logic [SW-1:0] sa2, sb2;

  always_ff @(posedge clk) begin
    ah2 <= a1[W-1:L];
    al2 <= a1[L-1:0];
    bh2 <= b1[W-1:L];
    bl2 <= b1[L-1:0];
    sa2 <= SW'(a1[W-1:L]) + SW'(a1[L-1:0]);
    sb2 <= SW'(b1[W-1:L]) + SW'(b1[L-1:0]);
  end

  // Stage 3: the three sub-products.
  logic [2*HW-1:0] p1_c, p1_3;
  logic [2*L-1:0]  p0_c, p0_3;
  logic [2*SW-1:0] p2_c, p2_3;

  kom_mult #(.W(HW)) u_p1 (.a(ah2), .b(bh2), .p(p1_c));
  kom_mult #(.W(L))  u_p0 (.a(al2), .b(bl2), .p(p0_c));
  kom_mult #(.W(SW)) u_p2 (.a(sa2), .b(sb2), .p(p2_c));

  always_ff @(posedge clk) begin
    p1_3 <= p1_c;
    p0_3 <= p0_c;
    p2_3 <= p2_c;
  end

  // Stage 4: S = P1 + P0 (2L-bit adder) and C = 2^(2L)*P1 + P0 (wiring only).
  logic [RW-1:0]   s4, c4;
  logic [2*SW-1:0] p2_4;

  always_ff @(posedge clk) begin
    s4   <= RW'(p1_3) + RW'(p0_3);
    c4   <= (RW'(p1_3) << (2 * L)) | RW'(p0_3);
    p2_4 <= p2_3;
  end

  // Stage 5: T = C + 2^L*P2 (3L-bit adder).
  logic [RW-1:0] s5, t5;

  always_ff @(posedge clk) begin
    t5 <= c4 + (RW'(p2_4) << L);
    s5 <= s4;
  end

  // Stage 6: Z = T - 2^L*S (3L-bit subtraction).
  logic [RW-1:0] z_c;
  logic [PW-1:0] z6;

  assign z_c = t5 - (s5 << L);

  always_ff @(posedge clk) begin
    z6 <= z_c[PW-1:0];
  end

  // The difference is the product of two W-bit numbers and must fit in 2W
  // bits; a set top bit would mean a wrong partial product.
  a_no_borrow : assert property (@(posedge clk) disable iff (!rst_n)
                                 vld[4] |-> !z_c[RW-1]);

  // Stage 7: binary-to-BCD conversion and output registers.
  logic [4*DD-1:0] bcd_c;

  double_dabble #(.BIN_W(PW), .DIGITS(DD)) u_bcd (.bin(z6), .bcd(bcd_c));

  always_ff @(posedge clk) begin
    y     <= bcd_c[4*Y_DIGITS-1:0];
    y_ovf <= (DD > Y_DIGITS) ? (bcd_c >> (4 * Y_DIGITS)) != '0 : 1'b0;
    z     <= z6;
  end

endmodule
