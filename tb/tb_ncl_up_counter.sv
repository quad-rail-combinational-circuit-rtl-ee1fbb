// tb_ncl_up_counter: self-checking test of the 4-bit NCL up-counter.
//
// The testbench plays both neighbours of the counter with a four-phase NCL
// handshake. The producer sends a dual-rail Inc DATA when ko = 1 and NULL
// when ko = 0. The consumer reads count once it is DATA, compares it with a
// model (starting at 0, adding each Inc mod 16), drives ki = 0, waits for
// count to go NULL and drives ki = 1. Each handshake step waits a random
// 1..3 time units. count must always be NULL or one-hot per digit.
//
// Mechanisms counted (each must occur): increments by 1, Inc = 0 (hold),
// rollover 1111 -> 0000, and a reset in the middle of counting, after which
// count must restart at 0000. A watchdog catches a stuck handshake.
module tb_ncl_up_counter;
  import ncl_pkg::*;

  localparam int STEPS = 60;   // Inc values per run

  logic       rst;
  dr_t        inc;
  logic       ki, ko;
  qr_t  [1:0] count;
  int         checks = 0;
  int         failures = 0;
  int         n_inc1 = 0, n_inc0 = 0, n_roll = 0, n_reset = 0;
  int         incs [STEPS];

  ncl_up_counter u_dut (.rst(rst), .inc(inc), .ki(ki), .ko(ko), .count(count));

  function automatic bit is_data(qr_t [1:0] c);
    return $onehot(c[0]) && $onehot(c[1]);
  endfunction

  function automatic int value(qr_t [1:0] c);
    int v = 0;
    for (int r = 0; r < 4; r++) begin
      if (c[0][r]) v += r;
      if (c[1][r]) v += 4 * r;
    end
    return v;
  endfunction

  // both digits NULL or one-hot, at every change
  always @(count) begin
    if (!rst && !(($onehot0(count[0])) && ($onehot0(count[1])))) begin
      failures++;
      $display("FAIL illegal count rails %b", count);
    end
  end

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

  // reads n + 1 values: the reset value and one per Inc
  task automatic consumer(int n);
    int expected = 0;
    for (int k = 0; k <= n; k++) begin
      wait ($onehot(count[0]) && $onehot(count[1]));
      pause();
      checks++;
      if (value(count) != expected) begin
        failures++;
        $display("FAIL read %0d: count=%0d expected %0d", k, value(count), expected);
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

  task automatic run(int n);
    fork
      producer(n);
      consumer(n);
    join
  endtask

  initial begin
    // mostly increments, so the run rolls over; some Inc = 0
    for (int k = 0; k < STEPS; k++) incs[k] = ($urandom_range(0, 3) == 0) ? 0 : 1;
    incs[0] = 0;
    do_reset();
    checks++;
    if (value(count) != 0 || !is_data(count) || ko !== 1'b0) begin
      failures++; $display("FAIL after reset: count=%b ko=%b", count, ko);
    end
    run(7);
    // reset in the middle of a count
    do_reset();
    n_reset++;
    run(STEPS);
    checks += 4;
    if (n_inc1 == 0) begin failures++; $display("FAIL no increment seen"); end
    if (n_inc0 == 0) begin failures++; $display("FAIL no Inc = 0 seen"); end
    if (n_roll == 0) begin failures++; $display("FAIL no rollover seen"); end
    if (n_reset == 0) begin failures++; $display("FAIL no reset seen"); end
    $display("increments=%0d holds=%0d rollovers=%0d resets=%0d", n_inc1, n_inc0, n_roll, n_reset);
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
