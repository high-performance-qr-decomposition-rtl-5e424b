// tb_coef_fifo: self-checking testbench of the alignment FIFO.
//
// Random pushes and pops (pops only when not empty, pushes only when not
// full) on a DEPTH = 16 FIFO, compared every cycle with a queue model: the
// head word, the occupancy count, filling to full and draining to empty.
module tb_coef_fifo;
  import qrd_pkg::*;

  localparam int DEPTH = 16;

  logic         clk = 0, rst_n = 0, push = 0, pop = 0;
  float_t       din = 0, dout;
  logic [4:0]   count;
  float_t       model [$];
  int           checks = 0, failures = 0, nfull = 0, nempty = 0;

  coef_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      automatic int bias = (n / 500) % 2;   // alternate filling and draining phases
      checks++;
      if (count != 5'(model.size()) || (model.size() > 0 && dout !== model[0])) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count %0d/%0d dout %h", n, count, model.size(), dout);
      end
      if (model.size() == DEPTH) nfull++;
      if (model.size() == 0) nempty++;
      push = (model.size() < DEPTH) && ($urandom_range(99) < (bias ? 70 : 30));
      pop  = (model.size() > 0) && ($urandom_range(99) < (bias ? 30 : 70));
      din  = $urandom;
      @(negedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    checks++;
    if (nfull == 0 || nempty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
