// ncl_pkg: types shared by the NULL Convention Logic (NCL) blocks.
//
// NCL is a clockless, delay-insensitive logic style. A value is carried on
// several one-hot "rails": a dual-rail signal (one bit) has rails 0 and 1, a
// quad-rail signal (two bits) has rails 0..3. Exactly one asserted rail is a
// DATA value; all rails low is NULL, the spacer that separates two DATA
// wavefronts. Asserting two rails of one signal at once is illegal.
//
// Encoding used throughout: bit i of a dr_t / qr_t is rail i, so the DATA
// value v of a quad-rail signal is 4'b0001 << v. The numbering of rails by
// value follows the document; packing them into vectors is this design's.
//
// gate_e lists the NCL threshold gates the two circuits use; ncl_gate gives
// each one's set function.
package ncl_pkg;

  typedef logic [1:0] dr_t;   // dual-rail signal, bit i = rail i
  typedef logic [3:0] qr_t;   // quad-rail signal, bit i = rail i

  localparam dr_t DR_NULL = 2'b00;
  localparam qr_t QR_NULL = 4'b0000;

  // Threshold gates used by the design. THmn: n inputs, threshold m; wX: the
  // weights of the leading inputs (others weigh 1).
  typedef enum logic [3:0] {
    TH12,      // A + B
    TH13,      // A + B + C
    TH14,      // A + B + C + D
    TH22,      // AB                       (2-input C-element)
    TH33,      // ABC                      (3-input C-element)
    TH33W2,    // AB + AC                  (A weighs 2)
    TH34W32,   // A + BC + BD              (A weighs 3, B weighs 2)
    TH24COMP,  // AC + BC + AD + BD
    THAND0     // AB + BC + AD
  } gate_e;

endpackage
