// tb_cog_gate: exhaustive self-checking testbench for cog_gate.
//
// Applies all 8 input patterns. For each it compares the outputs with a model
// written independently of the RTL (control A=0 passes B, C straight; A=1 exchanges them), checks that output parity equals input parity,
// and at the end checks that the 8 output patterns are all distinct, i.e. that
// the gate is reversible. A watchdog ends the run with a failure if it hangs.
module tb_cog_gate;

  localparam int N = 3;

  logic [N-1:0] in_v;
  logic [N-1:0] out_v;
  logic [N-1:0] exp;
  bit           seen [2**N];
  int           x;
  int           distinct;
  int           checks   = 0;
  int           failures = 0;

  cog_gate dut (
    .a(in_v[0]),
    .b(in_v[1]),
    .c(in_v[2]),
    .p(out_v[0]),
    .q(out_v[1]),
    .r(out_v[2])
  );

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 2**N; v++) begin
      in_v = N'(v);
      #1;
      exp = '0;
      x = 0;
      exp[0] = in_v[0];
      if (in_v[0] == 1'b0) begin exp[1] = in_v[1]; exp[2] = in_v[2]; end
      else begin exp[1] = in_v[2]; exp[2] = in_v[1]; end
      checks++;
      if (out_v !== exp) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", in_v, out_v, exp);
      end
      // parity preserving: XOR of outputs equals XOR of inputs
      checks++;
      if ((^out_v) != (^in_v)) begin
        failures++;
        $display("FAIL parity in=%b out=%b", in_v, out_v);
      end
      seen[out_v] = 1'b1;
    end
    distinct = 0;
    foreach (seen[i]) if (seen[i]) distinct++;
    checks++;
    if (distinct != 2**N) begin
      failures++;
      $display("FAIL not reversible: %0d distinct outputs of %0d", distinct, 2**N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
