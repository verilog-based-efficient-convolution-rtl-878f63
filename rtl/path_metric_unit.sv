// path_metric_unit: add-compare-select (ACS) for every trellis state.
//
// State ns (= {u, D1 .. D(K-2)}) is reached from the two states
// p_b = {ns[K-3:0], b}, b = 0/1, both on input u = ns[K-2]. For each the
// unit adds the old path metric of p_b and the branch metric of the code
// symbol that branch sends, keeps the smaller sum (the lower b wins a tie)
// and records b as the state's one-bit decision for the survivor memory.
//
// The smallest of the new metrics is then subtracted from all of them, so
// the best state always has metric 0 and the metrics stay within PMW bits:
// any state is reachable from any other in K-1 steps, so the spread between
// metrics stays below 2*(K-1) + the initial offset. The index of the (first)
// state with metric 0 is given as best_state for the traceback.
// Combinational; the metrics are held in path_metric_store.
// The source design names an ACS stage, 4-bit metrics and one decision bit
// per state; the normalisation and tie rules are choices of this design.
module path_metric_unit
  import viterbi_pkg::*;
#(
  parameter int unsigned K   = K_DEFAULT,
  parameter int unsigned G1  = G1_DEFAULT,
  parameter int unsigned G0  = G0_DEFAULT,
  parameter int unsigned PMW = 4,
  localparam int unsigned NS = 1 << (K - 1)
) (
  input  logic [PMW-1:0] pm_old [NS],
  input  logic [1:0]     bm [4],
  output logic [PMW-1:0] pm_new [NS],
  output logic [NS-1:0]  dec,
  output logic [K-2:0]   best_state
);

  logic [PMW:0] sum [NS];   // one guard bit before normalisation
  logic [PMW:0] min_sum;

  always_comb begin
    for (int ns = 0; ns < NS; ns++) begin
      logic         u;
      int unsigned  p0, p1;
      logic [PMW:0] m0, m1;
      u  = ns[K-2];
      p0 = (int'(ns) << 1) & (NS - 1);
      p1 = p0 | 1;
      m0 = {1'b0, pm_old[p0]} + (PMW+1)'(bm[code_symbol(K, G1, G0, p0, u)]);
      m1 = {1'b0, pm_old[p1]} + (PMW+1)'(bm[code_symbol(K, G1, G0, p1, u)]);
      dec[ns] = (m1 < m0);
      sum[ns] = (m1 < m0) ? m1 : m0;
    end

    min_sum    = sum[0];
    best_state = '0;
    for (int s = 1; s < NS; s++) begin
      if (sum[s] < min_sum) begin
        min_sum    = sum[s];
        best_state = (K-1)'(s);
      end
    end

    for (int s = 0; s < NS; s++) begin
      pm_new[s] = PMW'(sum[s] - min_sum);
    end
  end

endmodule
