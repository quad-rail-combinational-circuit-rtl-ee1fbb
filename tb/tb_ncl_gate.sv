// tb_ncl_gate: self-checking test of every ncl_gate kind.
//
// For each of the 15 non-NULL input patterns v, starting from NULL: the
// output must equal the gate's reference function of v (weighted threshold
// sum, or the TH24comp / THand0 product terms), must hold that value while
// the inputs shrink to any non-empty subset of v (hysteresis), and must be 0
// again once all inputs are NULL. Also checks the asynchronous reset of a
// TH22d- and a TH22n-style instance. Each step waits one time unit; a
// watchdog ends the run after a fixed number of steps.
module tb_ncl_gate;
  import ncl_pkg::*;

  localparam int NK = 9;
  localparam gate_e KINDS [NK] = '{TH12, TH13, TH14, TH22, TH33, TH33W2,
                                   TH34W32, TH24COMP, THAND0};

  logic [3:0]    in;   // in[0] = A .. in[3] = D
  logic [NK-1:0] z;
  logic          rst;
  logic          zr1, zr0;
  int            checks = 0;
  int            failures = 0;

  for (genvar k = 0; k < NK; k++) begin : g_dut
    ncl_gate #(.KIND(KINDS[k])) u_dut (
      .rst(1'b0), .a(in[0]), .b(in[1]), .c(in[2]), .d(in[3]), .z(z[k])
    );
  end
  ncl_gate #(.KIND(TH22), .RST_VAL(1'b1)) u_r1 (
    .rst(rst), .a(in[0]), .b(in[1]), .c(1'b0), .d(1'b0), .z(zr1));
  ncl_gate #(.KIND(TH22), .RST_VAL(1'b0)) u_r0 (
    .rst(rst), .a(in[0]), .b(in[1]), .c(1'b0), .d(1'b0), .z(zr0));

  // Reference: weighted threshold, or explicit sum of products.
  function automatic logic ref_fn(int k, logic [3:0] v);
    int w [4];
    int m;
    int sum;
    case (k)
      0: begin w = '{1, 1, 0, 0}; m = 1; end
      1: begin w = '{1, 1, 1, 0}; m = 1; end
      2: begin w = '{1, 1, 1, 1}; m = 1; end
      3: begin w = '{1, 1, 0, 0}; m = 2; end
      4: begin w = '{1, 1, 1, 0}; m = 3; end
      5: begin w = '{2, 1, 1, 0}; m = 3; end
      6: begin w = '{3, 2, 1, 1}; m = 3; end
      7: return (v[0] && v[2]) || (v[1] && v[2]) || (v[0] && v[3]) || (v[1] && v[3]);
      default: return (v[0] && v[1]) || (v[1] && v[2]) || (v[0] && v[3]);
    endcase
    sum = 0;
    for (int i = 0; i < 4; i++) if (v[i]) sum += w[i];
    return sum >= m;
  endfunction

  task automatic check_all(logic [3:0] v, string what);
    for (int k = 0; k < NK; k++) begin
      checks++;
      if (z[k] !== ref_fn(k, v)) begin
        failures++;
        $display("FAIL %s kind %0d: v=%b z=%b expected %b", what, k, v, z[k], ref_fn(k, v));
      end
    end
  endtask

  initial begin
    rst = 1'b0;
    in  = 4'b0000;
    #1;
    for (int v = 1; v < 16; v++) begin
      in = 4'b0000; #1;
      for (int k = 0; k < NK; k++) begin
        checks++;
        if (z[k] !== 1'b0) begin failures++; $display("FAIL NULL kind %0d", k); end
      end
      in = 4'(v); #1;
      check_all(4'(v), "set");
      // shrink to every non-empty subset of v: output must hold
      for (int w = 1; w < 16; w++) begin
        if ((w & ~v) == 0) begin
          in = 4'(w); #1;
          check_all(4'(v), "hold");
          in = 4'(v); #1;
        end
      end
    end
    // reset
    in = 4'b0001; rst = 1'b1; #1;
    checks += 2;
    if (zr1 !== 1'b1) begin failures++; $display("FAIL reset to 1"); end
    if (zr0 !== 1'b0) begin failures++; $display("FAIL reset to 0"); end
    rst = 1'b0; #1;
    checks += 2;
    if (zr1 !== 1'b1) begin failures++; $display("FAIL hold after reset 1"); end
    if (zr0 !== 1'b0) begin failures++; $display("FAIL hold after reset 0"); end
    in = 4'b0000; #1;
    checks++;
    if (zr1 !== 1'b0) begin failures++; $display("FAIL clear after reset"); end
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
