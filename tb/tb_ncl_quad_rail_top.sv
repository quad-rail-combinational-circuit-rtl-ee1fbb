// tb_ncl_quad_rail_top: end-to-end test of both designs, at the top's
// default (and only) configuration.
//
// Two environments run at the same time:
//  * Counter: a producer drives dual-rail Inc DATA/NULL following ko, a
//    consumer reads count when it is DATA, checks it against a model
//    (start 0, add each Inc mod 16) and answers with ki = 0 / ki = 1. The
//    run holds more than 16 increments, so count rolls over, some Inc = 0
//    steps, and a reset in mid-count after which count restarts at 0.
//  * PP generator: all 16 products A x B, in both input arrival orders,
//    each as a full NULL -> DATA -> NULL cycle; PPL must stay NULL while only
//    one input is DATA, and 4 * PPH + PPL must equal A * B.
// Mechanisms counted, each must occur at least once: counter increment, hold
// (Inc = 0), rollover, reset; PP products, the 3 x 3 maximum (PPH = 2), and
// a held-back PPL (input completeness). Random 1..3 unit handshake delays;
// a watchdog ends a stuck run.
module tb_ncl_quad_rail_top;
  import ncl_pkg::*;

  localparam int STEPS = 80;

  logic       rst;
  dr_t        inc;
  logic       ki, ko;
  qr_t  [1:0] count;
  qr_t        pp_a, pp_b, pph, ppl;
  int         checks = 0;
  int         failures = 0;
  int         n_inc1 = 0, n_inc0 = 0, n_roll = 0, n_reset = 0;
  int         n_prod = 0, n_max = 0, n_held = 0;
  int         incs [STEPS];

  ncl_quad_rail_top u_dut (
    .rst(rst), .inc(inc), .ki(ki), .ko(ko), .count(count),
    .pp_a(pp_a), .pp_b(pp_b), .pph(pph), .ppl(ppl)
  );

  function automatic int value(qr_t [1:0] c);
    int v = 0;
    for (int r = 0; r < 4; r++) begin
      if (c[0][r]) v += r;
      if (c[1][r]) v += 4 * r;
    end
    return v;
  endfunction

  task automatic pause();
    #($urandom_range(1, 3));
  endtask

  task automatic do_reset();
    inc = DR_NULL;
    ki  = 1'b1;
    rst = 1'b1;
    #2;
    rst = 1'b0;
    #1;
  endtask

  task automatic producer(int n);
    for (int k = 0; k < n; k++) begin
      wait (ko == 1'b1);
      pause();
      inc = dr_t'(2'b01 << incs[k]);
      wait (ko == 1'b0);
      pause();
      inc = DR_NULL;
    end
  endtask

  task automatic consumer(int n);
    int expected = 0;
    for (int k = 0; k <= n; k++) begin
      wait ($onehot(count[0]) && $onehot(count[1]));
      pause();
      checks++;
      if (value(count) != expected) begin
        failures++;
        $display("FAIL count read %0d: %0d expected %0d", k, value(count), expected);
      end
      if (k < n) begin
        if (incs[k] == 1) begin
          n_inc1++;
          if (expected == 15) n_roll++;
        end else begin
          n_inc0++;
        end
        expected = (expected + incs[k]) % 16;
      end
      ki = 1'b0;
      wait (count == 8'h00);
      pause();
      ki = 1'b1;
    end
  endtask

  task automatic counter_env();
    do_reset();
    fork
      producer(9);
      consumer(9);
    join
    do_reset();
    n_reset++;
    fork
      producer(STEPS);
      consumer(STEPS);
    join
  endtask

  task automatic pp_env();
    pp_a = QR_NULL;
    pp_b = QR_NULL;
    #1;
    for (int order = 0; order < 2; order++) begin
      for (int va = 0; va < 4; va++) begin
        for (int vb = 0; vb < 4; vb++) begin
          if (order == 0) pp_a = qr_t'(4'b0001 << va); else pp_b = qr_t'(4'b0001 << vb);
          pause();
          checks++;
          if (ppl !== QR_NULL) begin
            failures++; $display("FAIL PPL set with one input (%0d x %0d)", va, vb);
          end else begin
            n_held++;
          end
          if (order == 0) pp_b = qr_t'(4'b0001 << vb); else pp_a = qr_t'(4'b0001 << va);
          pause();
          checks++;
          if (!$onehot(pph) || !$onehot(ppl) ||
              4 * $clog2(int'(pph)) + $clog2(int'(ppl)) != va * vb) begin
            failures++;
            $display("FAIL %0d x %0d: pph=%b ppl=%b", va, vb, pph, ppl);
          end else begin
            n_prod++;
            if (pph == 4'b0100) n_max++;
          end
          pp_a = QR_NULL;
          pp_b = QR_NULL;
          pause();
          checks++;
          if (pph !== QR_NULL || ppl !== QR_NULL) begin
            failures++; $display("FAIL PP outputs not NULL");
          end
        end
      end
    end
  endtask

  initial begin
    for (int k = 0; k < STEPS; k++) incs[k] = ($urandom_range(0, 3) == 0) ? 0 : 1;
    incs[1] = 0;
    fork
      counter_env();
      pp_env();
    join
    checks += 7;
    if (n_inc1 == 0)  begin failures++; $display("FAIL no increment"); end
    if (n_inc0 == 0)  begin failures++; $display("FAIL no Inc = 0"); end
    if (n_roll == 0)  begin failures++; $display("FAIL no rollover"); end
    if (n_reset == 0) begin failures++; $display("FAIL no reset"); end
    if (n_prod != 32) begin failures++; $display("FAIL products checked: %0d", n_prod); end
    if (n_max == 0)   begin failures++; $display("FAIL 3 x 3 never produced"); end
    if (n_held == 0)  begin failures++; $display("FAIL PPL never held back"); end
    $display("counter: increments=%0d holds=%0d rollovers=%0d resets=%0d", n_inc1, n_inc0, n_roll, n_reset);
    $display("pp: products=%0d max=%0d held=%0d", n_prod, n_max, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
