// tb_ft_addsub_top: end-to-end testbench of ft_addsub_top at its default parameters.
//
// Part 1 drives the parallel adder/subtractor through every a, b, cin combination in
// add mode and in subtract mode, alternating the mode on every pattern so that the
// mode switch is exercised continually. Results are compared with integer
// arithmetic, and the XOR of all outputs (s_d, c_b, garbage) is compared with the XOR
// of all inputs of the chain (each cell's a, b, cntrl, plus cin; the internal carries
// appear once as an output and once as an input and cancel).
// Part 2 runs every gate of the gate set through all its input patterns against
// mod-2 arithmetic models.
// It counts each mechanism: additions, subtractions, carry out, borrow out, a carry
// or borrow rippling through all bits, mode switches and parity checks, and counts a
// failure for any that never happened.
module tb_ft_addsub_top;
  import rev_pkg::*;

  localparam int W = 4;

  logic [W-1:0]              a, b;
  logic                      cin;
  mode_e                     mode;
  logic [W-1:0]              s_d;
  logic                      c_b;
  logic [CELL_GARBAGE*W-1:0] garbage;

  logic       not_in,  not_out;
  logic [1:0] feynman_in, feynman_out;
  logic [2:0] fredkin_in, fredkin_out;
  logic [2:0] peres_in, peres_out;
  logic [2:0] toffoli_in, toffoli_out;
  logic [3:0] tsg_in, tsg_out;
  logic [3:0] mig_in, mig_out;
  logic [4:0] p2rg_in, p2rg_out;
  logic [2:0] cog_in, cog_out;

  int checks   = 0;
  int failures = 0;
  int n_add = 0, n_sub = 0, n_carry = 0, n_borrow = 0, n_ripple = 0, n_switch = 0, n_parity = 0;

  ft_addsub_top dut (
    .a, .b, .cin, .cntrl(mode), .s_d, .c_b, .garbage,
    .not_in, .not_out, .feynman_in, .feynman_out, .fredkin_in, .fredkin_out,
    .peres_in, .peres_out, .toffoli_in, .toffoli_out, .tsg_in, .tsg_out,
    .mig_in, .mig_out, .p2rg_in, .p2rg_out, .cog_in, .cog_out
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit m2(input int v);
    return (v % 2) == 1;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int    total;
    mode_e last_mode;
    bit    exp_cb;
    {not_in, feynman_in, fredkin_in, peres_in, toffoli_in, tsg_in, mig_in, p2rg_in, cog_in} = '0;
    last_mode = MODE_ADD;

    // Part 1: parallel adder/subtractor
    for (int x = 0; x < 2**W; x++)
      for (int y = 0; y < 2**W; y++)
        for (int c = 0; c < 2; c++)
          for (int k = 0; k < 2; k++) begin
            a    = W'(x);
            b    = W'(y);
            cin  = c[0];
            mode = ((k + x + y + c) % 2 == 1) ? MODE_SUB : MODE_ADD;
            #1;
            if (mode != last_mode) n_switch++;
            last_mode = mode;
            if (mode == MODE_ADD) begin
              n_add++;
              total  = x + y + c;
              exp_cb = total >= 2**W;
              if (exp_cb) n_carry++;
              if (exp_cb && total == 2**W) n_ripple++;   // e.g. 1111 + 0001: carry through every bit
            end else begin
              n_sub++;
              total  = x - y - c;
              exp_cb = total < 0;
              if (exp_cb) n_borrow++;
              if (exp_cb && total == -1) n_ripple++;     // e.g. 0000 - 0001: borrow through every bit
            end
            check(s_d == W'(total) && c_b == exp_cb,
                  $sformatf("%s a=%0d b=%0d cin=%0d: s_d=%0d c_b=%b", mode.name(), x, y, c, s_d, c_b));
            n_parity++;
            check(((^s_d) ^ c_b ^ (^garbage)) == ((^a) ^ (^b) ^ cin ^ (W % 2 == 1 ? mode : 1'b0)),
                  $sformatf("parity a=%0d b=%0d cin=%0d mode=%s", x, y, c, mode.name()));
          end

    // Part 2: gate set
    for (int v = 0; v < 32; v++) begin
      int A, B, C, D, E, X;
      A = v % 2; B = (v / 2) % 2; C = (v / 4) % 2; D = (v / 8) % 2; E = (v / 16) % 2;
      not_in     = 1'(A);
      feynman_in = 2'(v);
      fredkin_in = 3'(v);
      peres_in   = 3'(v);
      toffoli_in = 3'(v);
      tsg_in     = 4'(v);
      mig_in     = 4'(v);
      p2rg_in    = 5'(v);
      cog_in     = 3'(v);
      #1;
      X = ((1 - A) * (1 - C) + (1 - B)) % 2;
      check(not_out == m2(A + 1), "NOT");
      check(feynman_out == {m2(A + B), m2(A)}, "Feynman");
      check(fredkin_out == {m2(A * B + (1 - A) * C), m2(A * C + (1 - A) * B), m2(A)}, "Fredkin");
      check(cog_out == fredkin_out, "COG");
      check(peres_out == {m2(A * B + C), m2(A + B), m2(A)}, "Peres");
      check(toffoli_out == {m2(A * B + C), m2(B), m2(A)}, "Toffoli");
      check(tsg_out == {m2(A + B + D + A * B + C), m2(A + B + D), m2(A + B), m2(A)}, "TSG");
      check(mig_out == {m2(A * (1 - B) + D), m2(A * B + C), m2(A + B), m2(A)}, "MIG");
      check(p2rg_out == {m2(D + E + A * C), m2(A * (1 - B) + C + (1 - X) * D),
                         m2(X * D + A * B + C), m2(X + D), m2(A)}, "P2RG");
    end

    $display("mechanisms: add=%0d sub=%0d carry_out=%0d borrow_out=%0d full_ripple=%0d mode_switch=%0d parity=%0d",
             n_add, n_sub, n_carry, n_borrow, n_ripple, n_switch, n_parity);
    check(n_add > 0,    "no addition performed");
    check(n_sub > 0,    "no subtraction performed");
    check(n_carry > 0,  "no carry out");
    check(n_borrow > 0, "no borrow out");
    check(n_ripple > 0, "no full-length ripple");
    check(n_switch > 0, "no mode switch");
    check(n_parity > 0, "no parity check");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
