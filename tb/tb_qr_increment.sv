// tb_qr_increment: exhaustive self-checking test of the quad-rail incrementer.
//
// For every Inc (0, 1) and X (0..15), and for both arrival orders (X first or
// Inc first), starting from all-NULL: while only one input is DATA, S_0 must
// stay NULL (S_1 may already fire from X alone; completeness holds for S as a
// whole); once both are DATA, S must be the quad-rail encoding of
// (X + Inc) mod 16. Then the inputs return to NULL one at a time: S may not
// become all NULL while any input is still DATA, and must be all NULL after
// both are.
module tb_qr_increment;
  import ncl_pkg::*;

  dr_t        inc;
  qr_t  [1:0] x, s;
  int         checks = 0;
  int         failures = 0;

  qr_increment u_dut (.inc(inc), .x(x), .s(s));

  function automatic qr_t [1:0] enc(int v);
    qr_t [1:0] r;
    r[0] = qr_t'(4'b0001 << (v % 4));
    r[1] = qr_t'(4'b0001 << ((v / 4) % 4));
    return r;
  endfunction

  task automatic expect_incomplete(string what);
    checks++;
    if (s[0] !== QR_NULL) begin failures++; $display("FAIL %s: S_0=%b set early", what, s[0]); end
  endtask

  task automatic expect_null(string what);
    checks++;
    if (s !== '0) begin failures++; $display("FAIL %s: s=%h not NULL", what, s); end
  endtask

  task automatic expect_not_null(string what);
    checks++;
    if (s[0] == QR_NULL && s[1] == QR_NULL) begin
      failures++; $display("FAIL %s: s went NULL early", what);
    end
  endtask

  initial begin
    inc = DR_NULL; x = '0; #1;
    for (int order = 0; order < 2; order++) begin
      for (int i = 0; i < 2; i++) begin
        for (int v = 0; v < 16; v++) begin
          expect_null("start");
          if (order == 0) x = enc(v); else inc = dr_t'(2'b01 << i);
          #1;
          expect_incomplete("one input DATA");
          if (order == 0) inc = dr_t'(2'b01 << i); else x = enc(v);
          #1;
          checks++;
          if (s !== enc(v + i)) begin
            failures++;
            $display("FAIL %0d + %0d: s=%h expected %h", v, i, s, enc(v + i));
          end
          if (order == 0) inc = DR_NULL; else x = '0;
          #1;
          expect_not_null("one input NULL");
          if (order == 0) x = '0; else inc = DR_NULL;
          #1;
          expect_null("both NULL");
        end
      end
    end
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
