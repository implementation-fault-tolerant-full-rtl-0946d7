// tb_ft_full_addsub: exhaustive self-checking testbench for the one-bit fault tolerant
// full adder/subtractor.
//
// All 16 combinations of a, b, cin and cntrl are applied. The expected results come
// from integer arithmetic: in add mode a + b + cin gives sum and carry, in subtract
// mode a - b - cin gives difference and borrow. Each pattern also checks that the XOR
// of every output line (s_d, c_b, four garbage lines) equals the XOR of every input
// line (the two constant zeros add nothing), the property that makes a single line
// fault detectable. A watchdog ends a hung run with a failure.
module tb_ft_full_addsub;
  import rev_pkg::*;

  logic       a, b, cin;
  mode_e      mode;
  logic       s_d, c_b;
  logic [3:0] garbage;
  int         total;
  logic       exp_s, exp_c;
  int         checks   = 0;
  int         failures = 0;

  ft_full_addsub dut (
    .a       (a),
    .b       (b),
    .cin     (cin),
    .cntrl   (mode),
    .s_d     (s_d),
    .c_b     (c_b),
    .garbage (garbage)
  );

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      a    = v[0];
      b    = v[1];
      cin  = v[2];
      mode = v[3] ? MODE_SUB : MODE_ADD;
      #1;
      if (mode == MODE_ADD) begin
        total = int'(a) + int'(b) + int'(cin);
        exp_s = total[0];
        exp_c = total >= 2;
      end else begin
        total = int'(a) - int'(b) - int'(cin);
        exp_s = (total & 1) != 0;
        exp_c = total < 0;
      end
      checks++;
      if (s_d !== exp_s || c_b !== exp_c) begin
        failures++;
        $display("FAIL %s a=%b b=%b cin=%b: s_d=%b c_b=%b expected %b %b",
                 mode.name(), a, b, cin, s_d, c_b, exp_s, exp_c);
      end
      checks++;
      if ((s_d ^ c_b ^ (^garbage)) !== (a ^ b ^ cin ^ mode)) begin
        failures++;
        $display("FAIL parity a=%b b=%b cin=%b cntrl=%b garbage=%b", a, b, cin, mode, garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
