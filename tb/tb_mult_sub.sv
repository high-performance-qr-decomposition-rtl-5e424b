// tb_mult_sub: self-checking testbench of one multiply-subtract lane.
//
// Streams one random (c, k, x) triple per cycle into mult_sub and checks
// that y = c - k*x appears exactly LAT cycles later and equals, bit for bit,
// the single-precision product rounded first and the difference rounded
// after it (the unfused behaviour of a floating-point DSP block). Some
// triples use c = 0 (the q computation) and k = 0 (pass-through).
module tb_mult_sub;
  import tb_fp_pkg::*;

  localparam int LAT  = 4;
  localparam int NOPS = 3000;

  logic        clk = 0, rst_n = 0;
  logic [31:0] c = 0, k = 0, x = 0, y;
  logic [31:0] expv [NOPS];
  int          checks = 0, failures = 0;

  mult_sub #(.LAT(LAT)) dut (.clk, .rst_n, .c, .k, .x, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fork
      for (int n = 0; n < NOPS; n++) begin
        logic [31:0] tc, tk, tx;
        tc = rand_f(100, 140);
        tk = rand_f(110, 135);
        tx = rand_f(100, 140);
        if (n % 7 == 1) tc = 32'h0000_0000;
        if (n % 7 == 2) tk = 32'h0000_0000;
        expv[n] = r2f(f2r(tc) - f2r(r2f(f2r(tk) * f2r(tx))));
        c <= tc;
        k <= tk;
        x <= tx;
        @(posedge clk);
      end
      begin
        repeat (LAT) @(posedge clk);
        for (int n = 0; n < NOPS; n++) begin
          #1;
          checks++;
          if (y !== expv[n]) begin
            failures++;
            if (failures < 10) $display("op %0d: got %h expected %h", n, y, expv[n]);
          end
          @(posedge clk);
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
