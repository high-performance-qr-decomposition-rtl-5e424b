// tb_fp_div: self-checking testbench of the pipelined divider.
//
// Streams one random division per cycle (plus zero, infinity and NaN cases)
// into fp_div and checks every quotient bit-exactly against the correctly
// rounded single-precision result computed in double precision, and that
// each result appears exactly LAT cycles after its operands, marked by
// out_valid.
module tb_fp_div;
  import tb_fp_pkg::*;

  localparam int LAT  = 17;
  localparam int NOPS = 2000;

  logic        clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] a = 0, b = 0, y;
  logic [31:0] expv [NOPS];
  int          checks = 0, failures = 0, cyc = 0, nout = 0;

  fp_div #(.LAT(LAT)) dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);

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

  // output checker: the result of operation k is due at cycle k + LAT
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
          if (failures < 10) $display("op %0d: got %h expected %h", k, y, expv[k]);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < NOPS; k++) begin
      logic [31:0] ta, tb;
      ta = rand_f(100, 154);
      tb = rand_f(100, 154);
      case (k)
        1: tb = 32'h0000_0000;                 // x / 0 = inf
        2: begin ta = 0; tb = 32'h3F80_0000; end // 0 / 1 = 0
        3: begin ta = 0; tb = 0; end           // 0 / 0 = NaN
        4: tb = 32'h7F80_0000;                 // x / inf = 0
        5: ta = tb;                            // x / x = 1
        default: ;
      endcase
      if (k == 3) expv[k] = 32'h7FC0_0000;
      else if (k == 1) expv[k] = {ta[31] ^ tb[31], 8'hFF, 23'd0};
      else if (k == 4) expv[k] = {ta[31] ^ tb[31], 31'd0};
      else expv[k] = r2f(f2r(ta) / f2r(tb));
      a <= ta;
      b <= tb;
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
