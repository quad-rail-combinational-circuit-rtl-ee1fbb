// tb_ncl_completion: self-checking test of the C-element completion component.
//
// Drives random 3-bit acknowledge patterns into an N = 3 instance and
// compares the output after every step with a model: 1 once all inputs are
// 1, 0 once all are 0, unchanged otherwise. Checks both reset values.
module tb_ncl_completion;

  logic       rst;
  logic [2:0] in;
  logic       out1, out0;
  logic       model;
  int         checks = 0;
  int         failures = 0;
  int         rises = 0;

  ncl_completion #(.N(3), .RST_VAL(1'b1)) u_dut1 (.rst(rst), .in(in), .out(out1));
  ncl_completion #(.N(3), .RST_VAL(1'b0)) u_dut0 (.rst(rst), .in(in), .out(out0));

  initial begin
    in  = 3'b010;
    rst = 1'b1; #1;
    checks += 2;
    if (out1 !== 1'b1 || out0 !== 1'b0) begin
      failures++; $display("FAIL reset: %b %b", out1, out0);
    end
    rst = 1'b0; #1;
    checks += 2;
    if (out1 !== 1'b1 || out0 !== 1'b0) begin
      failures++; $display("FAIL hold after reset: %b %b", out1, out0);
    end
    in = 3'b000; #1;
    model = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      in = 3'($urandom_range(0, 7)); #1;
      if (in == 3'b111) begin
        if (!model) rises++;
        model = 1'b1;
      end else if (in == 3'b000) begin
        model = 1'b0;
      end
      checks += 2;
      if (out1 !== model || out0 !== model) begin
        failures++;
        $display("FAIL step %0d in=%b out=%b/%b model=%b", i, in, out1, out0, model);
      end
    end
    checks++;
    if (rises == 0) begin failures++; $display("FAIL no rising transition seen"); end
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
