// tb_column_ram: self-checking testbench of the column RAM.
//
// With N = 8 banks: loads every column through the external port, reads
// them back (data two cycles after the request), then hands the RAM to the
// core port (sel_core) and does simultaneous reads and writes of different
// columns, checks that the external port is ignored meanwhile, and reads
// the result back externally. A reference array models the contents.
module tb_column_ram;
  import qrd_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 8;

  logic           clk = 0, rst_n = 0, sel_core = 0;
  logic           core_re = 0, core_we = 0, ext_re = 0, ext_we = 0;
  idx_t           core_raddr = 0, core_waddr = 0, ext_addr = 0;
  float_t [N-1:0] core_wdata = '0, ext_wdata = '0, rd_data;
  float_t [N-1:0] ref_mem [N];
  float_t [N-1:0] want [$];
  int             checks = 0, failures = 0;

  column_ram #(.N(N)) dut (
    .clk, .rst_n, .sel_core, .core_re, .core_raddr, .core_we, .core_waddr, .core_wdata,
    .ext_re, .ext_we, .ext_addr, .ext_wdata, .rd_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read checker: a read issued at a negedge is due two posedges later
  logic [1:0] rv = 0;
  always @(negedge clk) begin
    if (rv[1]) begin
      checks++;
      if (rd_data !== want[0]) begin
        failures++;
        if (failures < 10) $display("read data %h expected %h", rd_data, want[0]);
      end
      void'(want.pop_front());
    end
  end
  always @(posedge clk) rv <= {rv[0], (sel_core ? core_re : ext_re)};

  function automatic float_t [N-1:0] rand_col();
    float_t [N-1:0] v;
    for (int r = 0; r < N; r++) v[r] = rand_f(1, 254);
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int c = 0; c < N; c++) begin
      ext_we = 1; ext_addr = idx_t'(c); ext_wdata = rand_col(); ref_mem[c] = ext_wdata;
      @(negedge clk);
    end
    ext_we = 0;
    for (int c = N - 1; c >= 0; c--) begin
      ext_re = 1; ext_addr = idx_t'(c); want.push_back(ref_mem[c]);
      @(negedge clk);
    end
    ext_re = 0;
    repeat (3) @(negedge clk);
    // core owns the RAM: the external port must have no effect
    sel_core = 1;
    @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      int ra = $urandom_range(N - 1);
      int wa = (ra + 1 + $urandom_range(N - 2)) % N;
      ext_we = 1; ext_addr = idx_t'($urandom_range(N - 1)); ext_wdata = rand_col();
      core_re = 1; core_raddr = idx_t'(ra);
      // the write lands one cycle after the request; reads of it follow later
      want.push_back(ref_mem[ra]);
      core_we = 1; core_waddr = idx_t'(wa); core_wdata = rand_col();
      @(negedge clk);
      ref_mem[wa] = core_wdata;
      core_we = 0; core_re = 0;
      @(negedge clk);
    end
    ext_we = 0;
    sel_core = 0;
    repeat (2) @(negedge clk);
    for (int c = 0; c < N; c++) begin
      ext_re = 1; ext_addr = idx_t'(c); want.push_back(ref_mem[c]);
      @(negedge clk);
    end
    ext_re = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (want.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
