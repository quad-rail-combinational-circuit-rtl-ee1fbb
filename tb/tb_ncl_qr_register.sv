// tb_ncl_qr_register: self-checking test of the quad-rail NCL register.
//
// Two N = 2 instances, one resetting to DATA 0 and one to NULL. Checks the
// reset values and Ko, then random legal traffic (an input signal turns to
// new DATA only while the stage is NULL and back to NULL only while it holds
// DATA; Ki random per signal) against a per-signal model: the
// register copies its input when input and Ki agree (DATA with Ki = 1, NULL
// with Ki = 0) and holds otherwise; Ko = 1 exactly when the output is NULL.
module tb_ncl_qr_register;
  import ncl_pkg::*;

  logic       rst;
  logic [1:0] ki;
  qr_t  [1:0] d, qa, qb, model;
  logic [1:0] koa, kob;
  int         checks = 0;
  int         failures = 0;
  int         passes = 0, holds = 0;

  ncl_qr_register #(.N(2), .RESET_DATA0(1'b1)) u_a (
    .rst(rst), .ki(ki), .d(d), .q(qa), .ko(koa));
  ncl_qr_register #(.N(2), .RESET_DATA0(1'b0)) u_b (
    .rst(rst), .ki(ki), .d(d), .q(qb), .ko(kob));

  initial begin
    rst = 1'b1; ki = 2'b11; d = '{QR_NULL, QR_NULL}; #1;
    checks += 4;
    if (qa !== {4'b0001, 4'b0001}) begin failures++; $display("FAIL reset DATA0: %h", qa); end
    if (qb !== 8'h00)              begin failures++; $display("FAIL reset NULL: %h", qb); end
    if (koa !== 2'b00)             begin failures++; $display("FAIL ko DATA0: %b", koa); end
    if (kob !== 2'b11)             begin failures++; $display("FAIL ko NULL: %b", kob); end
    // release reset with Ki = 1, input NULL: both hold
    rst = 1'b0; #1;
    checks++;
    if (qa !== {4'b0001, 4'b0001} || qb !== 8'h00) begin
      failures++; $display("FAIL hold after reset");
    end
    // bring both to NULL, then run random traffic
    ki = 2'b00; #1;
    model = '{QR_NULL, QR_NULL};
    for (int i = 0; i < 3000; i++) begin
      for (int s = 0; s < 2; s++) begin
        // legal NCL traffic: the upstream stage sends new DATA only while
        // this stage is NULL (Ko = 1) and NULL only while it holds DATA
        if ($urandom_range(0, 1) == 1) begin
          if (model[s] == QR_NULL && d[s] == QR_NULL) d[s] = qr_t'(4'b0001 << $urandom_range(0, 3));
          else if (model[s] != QR_NULL) d[s] = QR_NULL;
        end
        ki[s] = 1'($urandom_range(0, 1));
        if ((d[s] != QR_NULL) == ki[s]) begin
          if (model[s] != d[s]) passes++;
          model[s] = d[s];
        end else begin
          holds++;
        end
      end
      #1;
      checks += 2;
      if (qa !== model || qb !== model) begin
        failures++;
        $display("FAIL step %0d d=%h ki=%b q=%h/%h model=%h", i, d, ki, qa, qb, model);
      end
      for (int s = 0; s < 2; s++) begin
        checks++;
        if (koa[s] !== (model[s] == QR_NULL) || kob[s] !== (model[s] == QR_NULL)) begin
          failures++; $display("FAIL ko step %0d signal %0d", i, s);
        end
      end
    end
    checks++;
    if (passes == 0 || holds == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
