// qr_pp_gen: quad-rail partial product (PP) generation component.
//
// Multiplies two unsigned quad-rail digits (2 bits each): A x B = 4*PPH + PPL,
// PPH and PPL quad-rail digits. It is the building block of an unsigned
// quad-rail multiplier. The gate network is the document's optimized one:
//
//   PPH^0 = A^0 + A^1 + B^0 + B^1            TH14
//   PPH^1 = A^2B^2 + A^2B^3 + A^3B^2         THand0(A^2, B^2, A^3, B^3)
//   PPH^2 = A^3B^3                           TH22
//   PPH^3 = 0                                (3 x 3 = 9 = 21 in base 4)
//   PPL^0 = A^0(B^3+B^1) + B^0(A^3+A^1) + (A^2+A^0)(B^2+B^0)
//           two TH33w2 and a TH24comp into a TH13
//   PPL^1 = TH24comp(A^1, B^3, B^1, A^3)     A^1B^1 + A^3B^3 (+ don't cares)
//   PPL^2 = A^2(B^3+B^1) + B^2(A^1+A^3)      TH33w2 into a TH34w32
//   PPL^3 = TH24comp(A^1, B^1, B^3, A^3)     A^1B^3 + A^3B^1 (+ don't cares)
//
// The TH33w2 gates take their weight-2 input on pin A. PPL^2's second gate
// has a weight-3 input (the TH33w2 output) and a weight-2 input (B^2); it is
// implemented as the standard TH34w32 gate (A + BC + BD).
//
// Completion: PPL is input-complete in both A and B (PPL^0 was extended for
// that), PPH is not (PPH^0 fires on A or B alone). A consumer must therefore
// detect completion of the pair on PPL, or of PPH and PPL together.
//
// Pure NCL combinational logic: no reset, zero delay. Worst-case depth: one
// gate for PPH, two for PPL.
module qr_pp_gen
  import ncl_pkg::*;
(
  input  qr_t a,
  input  qr_t b,
  output qr_t pph,
  output qr_t ppl
);

  logic l0_a, l0_b, l0_c;   // the three partial sets of PPL^0
  logic l2_a;               // A^2(B^3 + B^1), first set of PPL^2

  // PPH
  ncl_gate #(.KIND(TH14)) u_pph0 (
    .rst(1'b0), .a(a[1]), .b(a[0]), .c(b[1]), .d(b[0]), .z(pph[0])
  );
  ncl_gate #(.KIND(THAND0)) u_pph1 (
    .rst(1'b0), .a(a[2]), .b(b[2]), .c(a[3]), .d(b[3]), .z(pph[1])
  );
  ncl_gate #(.KIND(TH22)) u_pph2 (
    .rst(1'b0), .a(a[3]), .b(b[3]), .c(1'b0), .d(1'b0), .z(pph[2])
  );
  assign pph[3] = 1'b0;

  // PPL^0
  ncl_gate #(.KIND(TH33W2)) u_l0a (
    .rst(1'b0), .a(a[0]), .b(b[3]), .c(b[1]), .d(1'b0), .z(l0_a)
  );
  ncl_gate #(.KIND(TH33W2)) u_l0b (
    .rst(1'b0), .a(b[0]), .b(a[3]), .c(a[1]), .d(1'b0), .z(l0_b)
  );
  ncl_gate #(.KIND(TH24COMP)) u_l0c (
    .rst(1'b0), .a(a[2]), .b(a[0]), .c(b[2]), .d(b[0]), .z(l0_c)
  );
  ncl_gate #(.KIND(TH13)) u_ppl0 (
    .rst(1'b0), .a(l0_a), .b(l0_b), .c(l0_c), .d(1'b0), .z(ppl[0])
  );

  // PPL^1
  ncl_gate #(.KIND(TH24COMP)) u_ppl1 (
    .rst(1'b0), .a(a[1]), .b(b[3]), .c(b[1]), .d(a[3]), .z(ppl[1])
  );

  // PPL^2
  ncl_gate #(.KIND(TH33W2)) u_l2a (
    .rst(1'b0), .a(a[2]), .b(b[3]), .c(b[1]), .d(1'b0), .z(l2_a)
  );
  ncl_gate #(.KIND(TH34W32)) u_ppl2 (
    .rst(1'b0), .a(l2_a), .b(b[2]), .c(a[1]), .d(a[3]), .z(ppl[2])
  );

  // PPL^3
  ncl_gate #(.KIND(TH24COMP)) u_ppl3 (
    .rst(1'b0), .a(a[1]), .b(b[1]), .c(b[3]), .d(a[3]), .z(ppl[3])
  );

endmodule
