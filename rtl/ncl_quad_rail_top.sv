// ncl_quad_rail_top: the two quad-rail NCL example designs side by side.
//
//  * ncl_up_counter: a 4-bit NCL up-counter (quad-rail increment circuitry and
//    a three-register feedback ring) with its own NCL handshake (ki / ko).
//  * qr_pp_gen: a quad-rail 2 x 2-bit partial product generator, purely
//    combinational NCL logic: apply DATA on a and b, read pph/ppl, then
//    return both inputs to NULL.
//
// The two do not interact; each keeps its own ports. All signals use the
// ncl_pkg encoding (bit i = rail i, all zero = NULL). rst only affects the
// counter. Asynchronous, zero-delay model.
module ncl_quad_rail_top
  import ncl_pkg::*;
(
  // counter
  input  logic       rst,
  input  dr_t        inc,
  input  logic       ki,
  output logic       ko,
  output qr_t  [1:0] count,
  // partial product generator
  input  qr_t        pp_a,
  input  qr_t        pp_b,
  output qr_t        pph,
  output qr_t        ppl
);

  ncl_up_counter u_counter (
    .rst   (rst),
    .inc   (inc),
    .ki    (ki),
    .ko    (ko),
    .count (count)
  );

  qr_pp_gen u_pp_gen (
    .a   (pp_a),
    .b   (pp_b),
    .pph (pph),
    .ppl (ppl)
  );

endmodule
