// ncl_gate: one NCL threshold gate with hysteresis.
//
// An NCL gate asserts its output when its set function of the inputs is true
// (the threshold is reached) and deasserts it only when every input is low
// (NULL). In between it holds its last value. That hysteresis is what makes
// NCL circuits delay-insensitive: an output can only change once per DATA
// wavefront and once per NULL wavefront.
//
// The set functions of the kinds in ncl_pkg::gate_e are the standard NCL gate
// definitions; the document names the gates and gives the equations they
// implement, the input letters A..D follow its schematics. Unused inputs must
// be tied low.
//
// The hold state is written as a level-sensitive latch (enable = set or all
// inputs low, data = set). The latch and the combinational paths through it
// are intended: an NCL gate is a state-holding element, and the circuits built
// from it are asynchronous. rst is an asynchronous reset to RST_VAL, used for
// the gates of registers that must start at DATA or NULL (TH22n / TH22d style
// gates); tie it low in combinational logic.
//
// Timing: zero delay; the output follows its inputs within the same time step.
module ncl_gate
  import ncl_pkg::*;
#(
  parameter gate_e KIND    = TH22,
  parameter bit    RST_VAL = 1'b0
) (
  input  logic rst,
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic z
);

  logic set_fn;
  logic all_null;

  always_comb begin
    unique case (KIND)
      TH12:     set_fn = a | b;
      TH13:     set_fn = a | b | c;
      TH14:     set_fn = a | b | c | d;
      TH22:     set_fn = a & b;
      TH33:     set_fn = a & b & c;
      TH33W2:   set_fn = a & (b | c);
      TH34W32:  set_fn = a | (b & (c | d));
      TH24COMP: set_fn = (a | b) & (c | d);
      THAND0:   set_fn = (a & b) | (b & c) | (a & d);
      default:  set_fn = 1'b0;
    endcase
  end

  assign all_null = ~(a | b | c | d);

  always_latch begin
    if (rst)                     z = RST_VAL;
    else if (set_fn || all_null) z = set_fn;
  end

endmodule
