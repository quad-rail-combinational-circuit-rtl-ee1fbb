// ncl_completion: completion component ("COMP") of an NCL pipeline.
//
// Combines N acknowledge signals into one with C-element behaviour: the
// output rises when every input is high (all stages ready for DATA), falls
// when every input is low (all stages ready for NULL), and otherwise holds.
// This is a THnn gate; a gate library builds it from a tree of TH44/TH33/TH22
// gates, which has the same function. Here it is one N-input latch, the
// simplest thing with that function: the document names the component but not
// its insides.
//
// Ports: in[N-1:0] the acknowledges, out the combined acknowledge, rst an
// asynchronous reset of the held state to RST_VAL. Zero delay.
module ncl_completion #(
  parameter int unsigned N       = 2,
  parameter bit          RST_VAL = 1'b1
) (
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic         out
);

  logic all_hi;
  logic all_lo;

  assign all_hi = &in;
  assign all_lo = ~|in;

  always_latch begin
    if (rst)                 out = RST_VAL;
    else if (all_hi || all_lo) out = all_hi;
  end

endmodule
