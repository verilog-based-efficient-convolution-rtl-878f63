// path_metric_store: the register set holding one path metric per state.
//
// On reset, and on `init` (start of a new message), it loads the starting
// metrics: 0 for state 0, where the encoder starts, and PM_INIT (half the
// metric range, 1000 binary for 4-bit metrics) for every other state, so
// that paths not starting in state 0 lose. Otherwise it loads the new
// metrics from the add-compare-select when `load` is high. Registered
// output pm_old feeds the ACS in the next symbol period. init wins over
// load. reset is synchronous and active high.
// The register set and its start values 0 / 1000 follow the source design;
// the init input used at message ends is a choice of this design.
module path_metric_store #(
  parameter int unsigned K   = 3,
  parameter int unsigned PMW = 4,
  parameter int unsigned PM_INIT = 1 << (PMW - 1),
  localparam int unsigned NS = 1 << (K - 1)
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           init,
  input  logic           load,
  input  logic [PMW-1:0] pm_new [NS],
  output logic [PMW-1:0] pm_old [NS]
);

  always_ff @(posedge clk) begin
    for (int s = 0; s < NS; s++) begin
      if (reset || init) pm_old[s] <= (s == 0) ? '0 : PMW'(PM_INIT);
      else if (load)     pm_old[s] <= pm_new[s];
    end
  end

endmodule
