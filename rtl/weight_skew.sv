// weight_skew: per-PE weight delay of the vector systolic array.
//
// The weight vectors of one array cycle are broadcast on a single bus, weight
// k in the k-th clock after `start`. PE #k must capture weight k, i.e. the
// bus value `k` clocks after start, which is the "delay k" of the dataflow.
// Instead of N_PE delay lines of full vectors, a one-bit token is shifted
// along a chain: load[k] is `start` delayed by k clocks, and PE #k loads the
// bus when its load bit is high. After N_PE clocks every PE holds its weight
// (32 clocks per cycle at the default size).
//
// Interface: `start` is a one-cycle pulse; load[0] is combinational from it,
// load[k] is registered (k cycles later). A new start may follow N_PE or more
// cycles after the previous one. The token chain is this design's choice; the
// description gives the 0..N_PE-1 clock delays.
module weight_skew #(
  parameter int unsigned N_PE = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic [N_PE-1:0] load
);

  logic [N_PE-1:1] tok_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tok_q <= '0;
    else        tok_q <= {tok_q[N_PE-2:1], start};
  end

  assign load = {tok_q, start};

endmodule
