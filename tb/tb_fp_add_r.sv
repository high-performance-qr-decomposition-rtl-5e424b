// tb_fp_add_r: self-checking testbench of the registered adder.
//
// Applies random operands (signs mixed, exponents over a wide range, with
// cases of equal and opposite operands, zeros and infinities) one per cycle
// and checks every result bit-exactly, one cycle later, against the
// correctly rounded single-precision a + b computed in double precision.
module tb_fp_add_r;
  import tb_fp_pkg::*;

  localparam int NOPS = 5000;

  logic        clk = 0;
  logic [31:0] a = 0, b = 0, y;
  int          checks = 0, failures = 0;

  fp_add_r dut (.clk, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NOPS; k++) begin
      logic [31:0] ta, tb, ev;
      ta = rand_f(60, 190);
      tb = (k % 3 == 0) ? rand_f(int'(ta[30:23]) - 3, int'(ta[30:23]) + 3) : rand_f(60, 190);
      case (k)
        1: tb = {~ta[31], ta[30:0]};           // x + (-x)
        2: tb = 32'h0000_0000;
        3: tb = 32'h7F80_0000;
        4: begin ta = 32'h7F80_0000; tb = 32'hFF80_0000; end
        default: ;
      endcase
      if (k == 4) ev = 32'h7FC0_0000;
      else if (k == 3) ev = ("add" == "mul") ? {ta[31], 8'hFF, 23'd0} : 32'h7F80_0000;
      else ev = r2f(f2r(ta) + f2r(tb));
      if ("add" == "add" && k == 1) ev = 32'h0000_0000;
      a = ta;
      b = tb;
      @(posedge clk);
      #1;
      checks++;
      if (y !== ev) begin
        failures++;
        if (failures < 10) $display("op %0d: %h + %h got %h expected %h", k, ta, tb, y, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
