// tb_fp_sqrt: self-checking testbench of the pipelined square root.
//
// Streams one random positive operand per cycle, plus the special cases
// zero, infinity and a negative number, into fp_sqrt, and checks every result
// bit-exactly against the same function computed in double precision and
// rounded to single precision, and that each result appears exactly LAT
// cycles after its operand, marked by out_valid.
module tb_fp_sqrt;
  import tb_fp_pkg::*;

  localparam int LAT  = 11;
  localparam int NOPS = 2000;

  logic        clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] a = 0, y;
  logic [31:0] expv [NOPS];
  int          checks = 0, failures = 0, cyc = 0, nout = 0;

  fp_sqrt #(.LAT(LAT)) dut (.clk, .rst_n, .in_valid, .a, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) cyc <= cyc + 1;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      automatic int k = cyc - LAT;
      automatic bit due = (k >= 0) && (k < NOPS);
      checks++;
      if (out_valid != due) begin
        failures++;
        $display("valid mismatch at cycle %0d: %b", cyc, out_valid);
      end
      if (due) begin
        checks++;
        nout++;
        if (y !== expv[k]) begin
          failures++;
          if (failures < 10) $display("op %0d: a=%h got %h expected %h", k, dut.u_pipe.d, y, expv[k]);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < NOPS; k++) begin
      logic [31:0] ta;
      ta = rand_f(20, 234);
      ta[31] = 1'b0;
      case (k)
        1: ta = 32'h0000_0000;
        2: ta = 32'h7F80_0000;
        3: ta = 32'hC080_0000;   // -4: NaN
        4: ta = 32'h4080_0000;   // 4
        5: ta = 32'h4010_0000;   // 2.25
        default: ;
      endcase
      if (k == 3) expv[k] = 32'h7FC0_0000;
      else if (k == 1) expv[k] = ("sqrt" == "sqrt") ? 32'h0000_0000 : 32'h7F80_0000;
      else if (k == 2) expv[k] = ("sqrt" == "sqrt") ? 32'h7F80_0000 : 32'h0000_0000;
      else expv[k] = r2f($sqrt(f2r(ta)));
      a <= ta;
      in_valid <= 1;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (nout != NOPS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
