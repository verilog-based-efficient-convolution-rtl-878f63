// tb_branch_metric_unit: exhaustive check of the four Hamming distances for
// every received symbol against a table worked out by hand.
module tb_branch_metric_unit;
  logic [1:0] rx;
  logic [1:0] bm [4];
  int checks = 0, failures = 0;
  // expected distance for rx (row) to code symbol c (column) 00, 01, 10, 11
  int exp_tab [4][4] = '{'{0, 1, 1, 2}, '{1, 0, 2, 1}, '{1, 2, 0, 1}, '{2, 1, 1, 0}};

  branch_metric_unit dut (.rx(rx), .bm(bm));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx = 2'(r);
      #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(bm[c]) != exp_tab[r][c]) begin
          failures++;
          $display("rx=%b c=%0d got %0d exp %0d", rx, c, bm[c], exp_tab[r][c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
