// ncl_qr_register: NCL register stage for N quad-rail signals.
//
// Each rail is a TH22 gate (2-input C-element) of the incoming rail and the
// stage's Ki. With Ki high (the next stage requests DATA) a DATA wavefront
// passes; with Ki low (request for NULL) a NULL wavefront passes; the TH22
// hysteresis holds the stage while input and Ki disagree. Ko of a signal is
// the NOR of its four output rails: high (ready for DATA) while the signal is
// NULL, low (ready for NULL) while it holds DATA.
//
// Ki and Ko are per signal, so a register feeding a register needs no
// completion tree (bitwise completion); where signals are combined by logic
// the caller merges the Ko bits with ncl_completion and fans one Ki out.
//
// Reset (asynchronous, rst high): RESET_DATA0 = 1 gives every signal the
// DATA value 0 (rail 0 set, a TH22d gate), otherwise NULL (TH22n gates). The
// two reset flavours are the document's ("Reset to DATA 0", "Reset to
// NULL"); the TH22-per-rail structure and per-signal Ko are this design's
// reading of the standard NCL register. Immediate assertions flag a signal
// with more than one rail high on the input or the output (outside reset).
module ncl_qr_register
  import ncl_pkg::*;
#(
  parameter int unsigned N           = 2,
  parameter bit          RESET_DATA0 = 1'b0
) (
  input  logic         rst,
  input  logic [N-1:0] ki,
  input  qr_t  [N-1:0] d,
  output qr_t  [N-1:0] q,
  output logic [N-1:0] ko
);

  for (genvar s = 0; s < N; s++) begin : g_sig
    for (genvar r = 0; r < 4; r++) begin : g_rail
      ncl_gate #(.KIND(TH22), .RST_VAL(RESET_DATA0 && (r == 0))) u_th22 (
        .rst(rst), .a(d[s][r]), .b(ki[s]), .c(1'b0), .d(1'b0), .z(q[s][r])
      );
    end
    assign ko[s] = ~|q[s];

    // NCL rule: a quad-rail signal is NULL or has exactly one rail high.
    always_comb begin
      if (!rst) begin
        assert ((d[s] & (d[s] - 4'd1)) == 4'd0)
          else $error("ncl_qr_register: input signal %0d has several rails high: %b", s, d[s]);
        assert ((q[s] & (q[s] - 4'd1)) == 4'd0)
          else $error("ncl_qr_register: output signal %0d has several rails high: %b", s, q[s]);
      end
    end
  end

endmodule
