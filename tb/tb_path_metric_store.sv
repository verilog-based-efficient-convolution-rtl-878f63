// tb_path_metric_store: checks the starting metrics after reset (0 for state
// 0, 8 for the others), loading of new metrics, hold when idle, and that
// init overrides load.
module tb_path_metric_store;
  localparam int K = 3, NS = 4, PMW = 4;
  logic clk = 0, reset = 1, init = 0, load = 0;
  logic [PMW-1:0] pm_new [NS];
  logic [PMW-1:0] pm_old [NS];
  logic [PMW-1:0] model [NS];
  int checks = 0, failures = 0;

  path_metric_store #(.K(K), .PMW(PMW)) dut (.*);
  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (pm_old[s] !== model[s]) begin
        failures++; $display("%s: pm_old[%0d]=%0d exp %0d", what, s, pm_old[s], model[s]);
      end
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NS; s++) pm_new[s] = '0;
    @(negedge clk); @(negedge clk);
    model = '{4'd0, 4'd8, 4'd8, 4'd8};
    compare("reset");
    reset = 0;
    for (int i = 0; i < 500; i++) begin
      automatic int op = $urandom_range(0, 3);
      for (int s = 0; s < NS; s++) pm_new[s] = PMW'($urandom());
      load = (op != 0);
      init = (op == 3) && ($urandom_range(0, 3) == 0);
      @(negedge clk);
      if (init)      model = '{4'd0, 4'd8, 4'd8, 4'd8};
      else if (load) model = pm_new;
      compare(init ? "init" : load ? "load" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
