// tb_qr_pp_gen: exhaustive self-checking test of the quad-rail partial
// product generator.
//
// For all 16 pairs (A, B) and both arrival orders, from all-NULL: with one
// input DATA, PPL must stay NULL (PPL is the input-complete digit); with
// both, 4 * PPH + PPL must equal A * B, each digit one-hot and PPH^3 never
// set. On the return to NULL, PPL may not become NULL while one input is
// still DATA, and both digits must be NULL once both inputs are.
module tb_qr_pp_gen;
  import ncl_pkg::*;

  qr_t a, b, pph, ppl;
  int  checks = 0;
  int  failures = 0;

  qr_pp_gen u_dut (.a(a), .b(b), .pph(pph), .ppl(ppl));

  function automatic qr_t enc(int v);
    return qr_t'(4'b0001 << v);
  endfunction

  initial begin
    a = QR_NULL; b = QR_NULL; #1;
    for (int order = 0; order < 2; order++) begin
      for (int va = 0; va < 4; va++) begin
        for (int vb = 0; vb < 4; vb++) begin
          checks++;
          if (pph !== QR_NULL || ppl !== QR_NULL) begin
            failures++; $display("FAIL not NULL at start");
          end
          if (order == 0) a = enc(va); else b = enc(vb);
          #1;
          checks++;
          if (ppl !== QR_NULL) begin
            failures++; $display("FAIL %0dx%0d: PPL set with one input", va, vb);
          end
          if (order == 0) b = enc(vb); else a = enc(va);
          #1;
          checks += 2;
          if (pph !== enc((va * vb) / 4) || ppl !== enc((va * vb) % 4)) begin
            failures++;
            $display("FAIL %0dx%0d: pph=%b ppl=%b", va, vb, pph, ppl);
          end
          if (pph[3] !== 1'b0) begin failures++; $display("FAIL PPH^3 set"); end
          if (order == 0) a = QR_NULL; else b = QR_NULL;
          #1;
          checks++;
          if (ppl !== enc((va * vb) % 4)) begin
            failures++; $display("FAIL %0dx%0d: PPL left DATA early", va, vb);
          end
          if (order == 0) b = QR_NULL; else a = QR_NULL;
          #1;
        end
      end
    end
    checks++;
    if (pph !== QR_NULL || ppl !== QR_NULL) begin failures++; $display("FAIL final NULL"); end
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
