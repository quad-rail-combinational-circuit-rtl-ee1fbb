// qr_increment: quad-rail increment circuitry of the 4-bit NCL up-counter.
//
// Computes S = X + Inc (mod 16). X and S are 4-bit values carried as two
// quad-rail digits (x[0]/s[0] low digit, x[1]/s[1] high digit); Inc is a
// dual-rail bit. The circuit is the optimized one of the document:
//
//   S_0^k = TH24comp(Inc^0, X_0^(k-1), Inc^1, X_0^k)
//         = Inc^0 X_0^k + Inc^1 X_0^(k-1)  (+ two don't-care products)
//   t1    = TH14(Inc^0, X_0^0, X_0^1, X_0^2)   no carry out of digit 0
//   t2    = TH22(Inc^1, X_0^3)                 carry out of digit 0
//   S_1^k = TH24comp(X_1^k, t2, t1, X_1^(k-1))
//         = X_1^k t1 + X_1^(k-1) t2  (+ don't cares t1 t2 and X_1^k X_1^(k-1))
//
// with rail indices taken mod 4 (pin order as in the schematic; for S_1^2
// and S_1^3 the schematic swaps the C and D pins, which TH24comp does not
// notice). t1 and t2 are shared by all four S_1 rails. Every S_0 product
// holds Inc and X_0, every S_1 product holds X_1, and t1/t2 need Inc and X_0,
// so no output rail is set before all inputs are DATA (input-complete), and
// outputs return to NULL only when all inputs are NULL.
//
// Pure NCL combinational logic: no reset, zero delay.
module qr_increment
  import ncl_pkg::*;
(
  input  dr_t        inc,
  input  qr_t  [1:0] x,
  output qr_t  [1:0] s
);

  logic t1;   // Inc^0 + X_0^0 + X_0^1 + X_0^2
  logic t2;   // Inc^1 X_0^3

  ncl_gate #(.KIND(TH14)) u_t1 (
    .rst(1'b0), .a(inc[0]), .b(x[0][0]), .c(x[0][1]), .d(x[0][2]), .z(t1)
  );
  ncl_gate #(.KIND(TH22)) u_t2 (
    .rst(1'b0), .a(inc[1]), .b(x[0][3]), .c(1'b0), .d(1'b0), .z(t2)
  );

  for (genvar k = 0; k < 4; k++) begin : g_rail
    localparam int KM1 = (k + 3) % 4;

    ncl_gate #(.KIND(TH24COMP)) u_s0 (
      .rst(1'b0), .a(inc[0]), .b(x[0][KM1]), .c(inc[1]), .d(x[0][k]), .z(s[0][k])
    );
    ncl_gate #(.KIND(TH24COMP)) u_s1 (
      .rst(1'b0), .a(x[1][k]), .b(t2), .c(t1), .d(x[1][KM1]), .z(s[1][k])
    );
  end

endmodule
