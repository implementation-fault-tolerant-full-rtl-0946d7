// tb_ft_parallel_addsub: self-checking testbench for the WIDTH-bit fault tolerant
// parallel adder/subtractor, at its default WIDTH of 4.
//
// Every combination of a, b, cin and cntrl (2 * 2 * 16 * 16 = 1024 patterns) is
// applied. Expected values come from integer arithmetic: {c_b, s_d} = a + b + cin in
// add mode; s_d = (a - b - cin) mod 2**WIDTH and c_b = (a - b - cin < 0) in subtract
// mode. For every cell the testbench also checks parity preservation: XOR of
// {s_d[i], carry out of cell i, its garbage} equals XOR of {a[i], b[i], carry into
// cell i, cntrl}. The internal carries are recomputed in the testbench for that.
module tb_ft_parallel_addsub;
  import rev_pkg::*;

  localparam int W = 4;

  logic [W-1:0]              a, b;
  logic                      cin;
  mode_e                     mode;
  logic [W-1:0]              s_d;
  logic                      c_b;
  logic [CELL_GARBAGE*W-1:0] garbage;
  int                        total;
  logic [W:0]                chain;
  int                        checks   = 0;
  int                        failures = 0;

  ft_parallel_addsub dut (
    .a       (a),
    .b       (b),
    .cin     (cin),
    .cntrl   (mode),
    .s_d     (s_d),
    .c_b     (c_b),
    .garbage (garbage)
  );

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int c = 0; c < 2; c++)
        for (int x = 0; x < 2**W; x++)
          for (int y = 0; y < 2**W; y++) begin
            mode = (m == 1) ? MODE_SUB : MODE_ADD;
            cin  = c[0];
            a    = W'(x);
            b    = W'(y);
            #1;
            total = (mode == MODE_ADD) ? x + y + c : x - y - c;
            checks++;
            if (s_d !== W'(total) || c_b !== ((mode == MODE_ADD) ? (total >= 2**W) : (total < 0))) begin
              failures++;
              $display("FAIL %s a=%0d b=%0d cin=%0d: s_d=%0d c_b=%b", mode.name(), x, y, c, s_d, c_b);
            end
            // carries into each cell, from prefix arithmetic on the low bits
            for (int i = 0; i <= W; i++) begin
              int lo_a, lo_b, part;
              lo_a = x % (2**i);
              lo_b = y % (2**i);
              part = (mode == MODE_ADD) ? lo_a + lo_b + c : lo_a - lo_b - c;
              chain[i] = (mode == MODE_ADD) ? (part >= 2**i) : (part < 0);
            end
            chain[0] = cin;
            for (int i = 0; i < W; i++) begin
              checks++;
              if ((s_d[i] ^ chain[i+1] ^ (^garbage[CELL_GARBAGE*i +: CELL_GARBAGE])) !==
                  (a[i] ^ b[i] ^ chain[i] ^ mode)) begin
                failures++;
                $display("FAIL parity cell %0d a=%0d b=%0d", i, x, y);
              end
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
