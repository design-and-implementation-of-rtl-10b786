// kom_mult: combinational Karatsuba-Ofman multiplier for unsigned binary
// operands of W bits.
//
// Each operand is cut into a high part (the upper W-W/2 bits) and a low part
// (the lower L = W/2 bits), so that A = AH*2^L + AL. Three sub-products are
// formed, P1 = AH*BH, P0 = AL*BL and P2 = (AH+AL)*(BH+BL), each by a recursive
// instance of this module, and recombined with the reordered Karatsuba-Ofman
// equation
//     P = 2^(2L)*P1 + P0 - 2^L*(P1+P0) + 2^L*P2
// in which 2^(2L)*P1 + P0 is a plain concatenation (P0 < 2^(2L)), leaving one
// 2L-bit addition (P1+P0), one 3L-bit addition and one 3L-bit subtraction after
// the sub-multipliers. The split, the three sub-products and this ordering of
// the recombination follow the algorithm as published for radix 10^n; here the
// radix is 2^L because the operands are plain binary numbers.
//
// Recursion stops at BASE_W bits, where the operator `*` is used. BASE_W = 4
// (one nibble, the size of a BCD digit) is this design's choice; it must be at
// least 3 because the P2 operands are one bit wider than the high half and a
// 3-bit operand would otherwise split into 3-bit sub-products forever.
//
// Interface: a, b in, p = a*b out (2*W bits). Purely combinational, no clock.
//
// Linted on its own as a top module, Verilator reports the sub-product nets of
// the recursive instances as undriven and unused: it checks a copy of the
// module that stands for the recursion and is never elaborated. The nets are
// driven in every real instance, and the same lint with kom_mult instantiated
// from another module reports nothing.
module kom_mult #(
  parameter int unsigned W      = 8,
  parameter int unsigned BASE_W = 4
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  if (BASE_W < 3) begin : g_bad_base
    $error("kom_mult: BASE_W must be at least 3");
  end

  if (W <= BASE_W) begin : g_leaf
    assign p = a * b;
  end else begin : g_split
    localparam int unsigned L  = W / 2;      // low part width
    localparam int unsigned HW = W - L;      // high part width (>= L)
    localparam int unsigned SW = HW + 1;     // width of AH+AL

    logic [HW-1:0]   ah, bh;
    logic [L-1:0]    al, bl;
    logic [SW-1:0]   sa, sb;
    logic [2*HW-1:0] p1;
    logic [2*L-1:0]  p0;
    logic [2*SW-1:0] p2;

    assign ah = a[W-1:L];
    assign al = a[L-1:0];
    assign bh = b[W-1:L];
    assign bl = b[L-1:0];
    assign sa = SW'(ah) + SW'(al);
    assign sb = SW'(bh) + SW'(bl);

    kom_mult #(.W(HW), .BASE_W(BASE_W)) u_p1 (.a(ah), .b(bh), .p(p1));
    kom_mult #(.W(L),  .BASE_W(BASE_W)) u_p0 (.a(al), .b(bl), .p(p0));
    kom_mult #(.W(SW), .BASE_W(BASE_W)) u_p2 (.a(sa), .b(sb), .p(p2));

    // Reordered recombination, computed modulo 2^(2W): the final result is a
    // W x W product and fits in 2W bits, so a carry or borrow out of the top
    // of an intermediate value cannot change it.
    localparam int unsigned PW = 2 * W;
    logic [PW-1:0] cat_hl, s10, t;

    always_comb begin
      cat_hl = (PW'(p1) << (2 * L)) | PW'(p0);   // 2^(2L)*P1 + P0
      s10    = PW'(p1) + PW'(p0);                // 2L-bit adder
      t      = cat_hl + (PW'(p2) << L);          // 3L-bit adder
      p      = t - (s10 << L);                   // 3L-bit subtraction
    end
  end

endmodule
