// tb_p2rg_gate: exhaustive self-checking testbench for p2rg_gate.
//
// Applies all 32 input patterns. For each it compares the outputs with a model
// written independently of the RTL (arithmetic mod 2 with X = ((1-A)(1-C) + 1-B) mod 2), checks that output parity equals input parity,
// and at the end checks that the 32 output patterns are all distinct, i.e. that
// the gate is reversible. A watchdog ends the run with a failure if it hangs.
module tb_p2rg_gate;

  localparam int N = 5;

  logic [N-1:0] in_v;
  logic [N-1:0] out_v;
  logic [N-1:0] exp;
  bit           seen [2**N];
  int           x;
  int           distinct;
  int           checks   = 0;
  int           failures = 0;

  p2rg_gate dut (
    .a(in_v[0]),
    .b(in_v[1]),
    .c(in_v[2]),
    .d(in_v[3]),
    .e(in_v[4]),
    .p(out_v[0]),
    .q(out_v[1]),
    .r(out_v[2]),
    .s(out_v[3]),
    .t(out_v[4])
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
      x = ((1 - in_v[0]) * (1 - in_v[2]) + (1 - in_v[1])) % 2;
      exp[0] = in_v[0];
      exp[1] = ((x + in_v[3]) % 2) == 1;
      exp[2] = ((x * in_v[3] + in_v[0] * in_v[1] + in_v[2]) % 2) == 1;
      exp[3] = ((in_v[0] * (1 - in_v[1]) + in_v[2] + (1 - x) * in_v[3]) % 2) == 1;
      exp[4] = ((in_v[3] + in_v[4] + in_v[0] * in_v[2]) % 2) == 1;
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
