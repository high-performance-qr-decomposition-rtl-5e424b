// pipe_delay: a fixed-latency delay line of W bits.
//
// Used to give every operator its specified latency and to carry tags
// and valid bits beside the data they describe. Stage k is a register
// loaded every cycle from stage k-1, so a value at d appears at q exactly LAT
// cycles later; LAT = 0 is a plain wire. Every stage clears to zero on the
// active-low synchronous reset, so valid bits carried here start low.
module pipe_delay #(
  parameter int unsigned W   = 1,
  parameter int unsigned LAT = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (LAT == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [LAT];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < int'(LAT); k++) stage[k] <= '0;
      end else begin
        stage[0] <= d;
        for (int k = 1; k < int'(LAT); k++) stage[k] <= stage[k-1];
      end
    end
    assign q = stage[LAT-1];
  end
endmodule
