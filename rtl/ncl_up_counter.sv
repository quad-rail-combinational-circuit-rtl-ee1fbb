// ncl_up_counter: 4-bit NCL up-counter with three-register feedback.
//
// count is held as two quad-rail digits. Each DATA value of the dual-rail
// input inc adds 0 or 1 to it (mod 16, so 1111 + 1 rolls over to 0000); reset
// sets it to 0000. The counter has a full NCL interface: ko tells the
// producer of inc when to send DATA (ko = 1) and NULL (ko = 0); ki is the
// request of the consumer of count (1 = ready for DATA, 0 = ready for NULL).
//
// Structure (as drawn in the document):
//
//   qr_increment --> reg1 --+--> reg2 --> reg3 --+
//      ^  ^  inc            |                    |
//      |  +-- X ------------|--------------------+
//      |                  count
//   reg1 resets to DATA 0, reg2 and reg3 to NULL.
//   reg1.Ki = COMP(reg2.Ko, ki)     (ncl_completion u_comp_ki)
//   reg2.Ki = reg3.Ko               (direct)
//   reg3.Ki = ko = COMP(reg1.Ko)    (ncl_completion u_comp_ko)
//
// A feedback loop in NCL needs three registers so that a DATA and a NULL
// wavefront can circulate with a bubble between them; reg1 starts holding the
// DATA token. One count step is a full DATA/NULL cycle on inc and on count.
//
// The reset flavours, the register ring, the COMP placement and count being
// taken after reg1 are the document's. The registers' per-signal Ko, the
// direct per-signal reg3 -> reg2 acknowledge, and the asynchronous reset of
// the COMP state are this design's choices. Asynchronous, zero-delay model.
//
// Lint tools report combinational loops here (register -> Ko -> COMP -> Ki ->
// register, and the data ring through the incrementer). They are the NCL
// handshake itself: every loop passes through a hysteresis latch of a TH22
// or C-element, changes at most once per wavefront and settles each time
// because every step waits for the environment (inc, ki).
module ncl_up_counter
  import ncl_pkg::*;
(
  input  logic       rst,
  input  dr_t        inc,
  input  logic       ki,
  output logic       ko,
  output qr_t  [1:0] count
);

  qr_t  [1:0] s;              // incrementer output
  qr_t  [1:0] r2_q, r3_q;     // reg2, reg3 outputs; reg3 output is X
  logic [1:0] r1_ko, r2_ko, r3_ko;
  logic       r1_ki;

  qr_increment u_inc (
    .inc (inc),
    .x   (r3_q),
    .s   (s)
  );

  ncl_qr_register #(.N(2), .RESET_DATA0(1'b1)) u_reg1 (
    .rst (rst),
    .ki  ({2{r1_ki}}),
    .d   (s),
    .q   (count),
    .ko  (r1_ko)
  );

  ncl_qr_register #(.N(2), .RESET_DATA0(1'b0)) u_reg2 (
    .rst (rst),
    .ki  (r3_ko),
    .d   (count),
    .q   (r2_q),
    .ko  (r2_ko)
  );

  ncl_qr_register #(.N(2), .RESET_DATA0(1'b0)) u_reg3 (
    .rst (rst),
    .ki  ({2{ko}}),
    .d   (r2_q),
    .q   (r3_q),
    .ko  (r3_ko)
  );

  // During reset reg2 is NULL (Ko = 1): reset reg1's request to DATA.
  ncl_completion #(.N(3), .RST_VAL(1'b1)) u_comp_ki (
    .rst (rst),
    .in  ({r2_ko, ki}),
    .out (r1_ki)
  );

  // During reset reg1 holds DATA (Ko = 0): reset the request to NULL.
  ncl_completion #(.N(2), .RST_VAL(1'b0)) u_comp_ko (
    .rst (rst),
    .in  (r1_ko),
    .out (ko)
  );

endmodule
