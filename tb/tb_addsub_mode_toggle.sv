// tb_addsub_mode_toggle: the one-bit adder/subtractor with its operands held and the
// mode line toggling, as in a bench simulation of the cell.
//
// a = 1, b = 1 and cin = 0 are held while cntrl alternates between add and subtract
// every 50 time units for 20 periods (the 100-unit period is a choice of this
// testbench). In add mode 1 + 1 + 0 must give sum 0 with carry 1; in subtract mode
// 1 - 1 - 0 must give difference 0 with no borrow, so c_b follows the complement of
// cntrl and s_d stays 0. The output parity is checked against the input parity on
// every half period. Then the same toggling is repeated for every other operand
// combination, so each of the eight operand patterns sees both mode edges.
module tb_addsub_mode_toggle;
  import rev_pkg::*;

  logic       a, b, cin;
  mode_e      mode;
  logic       s_d, c_b;
  logic [3:0] garbage;
  int         checks   = 0;
  int         failures = 0;
  int         edges    = 0;

  ft_full_addsub dut (
    .a, .b, .cin, .cntrl(mode), .s_d, .c_b, .garbage
  );

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample();
    int total;
    bit es, ec;
    total = (mode == MODE_ADD) ? int'(a) + int'(b) + int'(cin) : int'(a) - int'(b) - int'(cin);
    es = (total & 1) != 0;
    ec = (mode == MODE_ADD) ? (total > 1) : (total < 0);
    checks++;
    if (s_d !== es || c_b !== ec) begin
      failures++;
      $display("FAIL t=%0t %s a=%b b=%b cin=%b: s_d=%b c_b=%b expected %b %b",
               $time, mode.name(), a, b, cin, s_d, c_b, es, ec);
    end
    checks++;
    if ((s_d ^ c_b ^ (^garbage)) !== (a ^ b ^ cin ^ mode)) begin
      failures++;
      $display("FAIL parity t=%0t", $time);
    end
  endtask

  initial begin
    // the held pattern a=1, b=1, cin=0
    a = 1'b1; b = 1'b1; cin = 1'b0; mode = MODE_ADD;
    for (int i = 0; i < 40; i++) begin
      #50;
      sample();
      checks++;
      if (c_b !== (mode == MODE_ADD) || s_d !== 1'b0) begin
        failures++;
        $display("FAIL held pattern: c_b=%b s_d=%b in %s", c_b, s_d, mode.name());
      end
      mode = (mode == MODE_ADD) ? MODE_SUB : MODE_ADD;
      edges++;
    end
    // every other operand pattern under the same toggling
    for (int v = 0; v < 8; v++) begin
      {cin, b, a} = 3'(v);
      for (int i = 0; i < 4; i++) begin
        #50;
        sample();
        mode = (mode == MODE_ADD) ? MODE_SUB : MODE_ADD;
        edges++;
      end
    end
    checks++;
    if (edges < 2) begin
      failures++;
      $display("FAIL mode never toggled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
