// tb_path_metric_unit: drives the add-compare-select with random path and
// branch metrics and compares new metrics, decisions and best state with an
// independent integer model (trellis of the 7/5 code written out per
// state). Also runs the first step of the reference trellis example:
// metrics 0/8/8/8 and received 11.
module tb_path_metric_unit;
  localparam int K = 3, NS = 4, PMW = 4;
  logic [PMW-1:0] pm_old [NS];
  logic [1:0]     bm [4];
  logic [PMW-1:0] pm_new [NS];
  logic [NS-1:0]  dec;
  logic [K-2:0]   best_state;
  int checks = 0, failures = 0;

  path_metric_unit #(.K(K), .PMW(PMW)) dut (.*);

  // predecessors of state ns = {u, D1}: {D1, 0} and {D1, 1}; symbols of
  // the 7/5 code for (state, input), listed by hand from y1=u^D1^D2, y0=u^D2
  // state index = {D1, D2}
  function automatic int sym_of(int s, int u);
    int d1 = (s >> 1) & 1, d2 = s & 1;
    return ((u ^ d1 ^ d2) << 1) | (u ^ d2);
  endfunction

  task automatic check_once();
    int sums[NS]; int decs[NS]; int mn = 1000; int best = 0;
    for (int ns = 0; ns < NS; ns++) begin
      int u = ns >> 1; int d1 = ns & 1;
      int p0 = d1 << 1, p1 = (d1 << 1) | 1;
      int m0 = pm_old[p0] + bm[sym_of(p0, u)];
      int m1 = pm_old[p1] + bm[sym_of(p1, u)];
      decs[ns] = (m1 < m0);
      sums[ns] = (m1 < m0) ? m1 : m0;
      if (sums[ns] < mn) begin mn = sums[ns]; best = ns; end
    end
    #1;
    for (int ns = 0; ns < NS; ns++) begin
      checks += 2;
      if (int'(pm_new[ns]) != sums[ns] - mn) begin
        failures++; $display("pm_new[%0d]=%0d exp %0d", ns, pm_new[ns], sums[ns] - mn);
      end
      if (int'(dec[ns]) != decs[ns]) begin
        failures++; $display("dec[%0d]=%0d exp %0d", ns, dec[ns], decs[ns]);
      end
    end
    checks++;
    if (int'(best_state) != best) begin failures++; $display("best %0d exp %0d", best_state, best); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // first trellis step of the worked example: start in state 0, receive 11
    pm_old = '{4'd0, 4'd8, 4'd8, 4'd8};
    bm = '{2'd2, 2'd1, 2'd1, 2'd0};   // distances of 11 from 00, 01, 10, 11
    check_once();
    // state 0 -> 0 costs 2, state 0 -> 2 ({u=1,D1=0}) costs 0
    checks++;
    if (pm_new[2] != 0 || pm_new[0] != 2 || best_state != 2) begin
      failures++; $display("worked example step wrong");
    end
    for (int i = 0; i < 2000; i++) begin
      automatic logic [1:0] rx = 2'($urandom());
      for (int s = 0; s < NS; s++) pm_old[s] = PMW'($urandom_range(0, 9));
      for (int c = 0; c < 4; c++) bm[c] = 2'($countones(rx ^ 2'(c)));
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
