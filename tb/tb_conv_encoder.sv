// tb_conv_encoder: checks the convolutional encoder against the reference
// example (1011 -> 11 10 00 01) and against a bit-serial model on a random
// stream with random input gaps, output stalls and message ends. Also checks
// that each symbol appears one clock after its bit is taken.
module tb_conv_encoder;
  import vit_ref_pkg::*;

  logic clk = 0, reset = 1;
  logic in_bit = 0, in_valid = 0, in_last = 0, in_ready;
  logic [1:0] sym;
  logic sym_valid, sym_last, sym_ready = 1;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  bit     msg[$];
  bit     lst[$];
  bit [1:0] exp_q[$];
  bit     exp_last[$];
  int     accepted_cycle[$];
  int     cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard
  always @(posedge clk) if (!reset && sym_valid && sym_ready) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected symbol"); end
    else begin
      automatic bit [1:0] e = exp_q.pop_front();
      automatic bit el = exp_last.pop_front();
      automatic int ac = accepted_cycle.pop_front();
      if (sym !== e || sym_last !== el) begin
        failures++; $display("symbol mismatch got %b/%b exp %b/%b", sym, sym_last, e, el);
      end
      // the symbol must have been shown since the cycle after acceptance
      checks++;
      if (cycle < ac + 1) begin failures++; $display("symbol too early"); end
    end
  end

  task automatic send(input bit b, input bit l);
    in_bit <= b; in_last <= l; in_valid <= 1;
    do @(posedge clk); while (!in_ready);
    accepted_cycle.push_back(cycle);
    in_valid <= 0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seg[$];
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    // reference example: 1011 -> 11 10 00 01, one symbol per clock
    seg = '{1, 0, 1, 1};
    begin
      automatic sym_q_t q = ref_encode(3, 'b111, 'b101, seg);
      checks++;
      if (q[0] != 2'b11 || q[1] != 2'b10 || q[2] != 2'b00 || q[3] != 2'b01) begin
        failures++; $display("reference model disagrees with the worked example");
      end
      // hardware must produce the literal example
      exp_q = '{2'b11, 2'b10, 2'b00, 2'b01};
      exp_last = '{0, 0, 0, 1};
    end
    for (int i = 0; i < 4; i++) begin
      in_bit <= seg[i]; in_last <= (i == 3); in_valid <= 1;
      @(posedge clk);
      accepted_cycle.push_back(cycle - 1);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("example symbols missing"); end

    // random messages with gaps and stalls
    fork
      forever begin
        @(negedge clk);
        sym_ready = ($urandom_range(0, 3) != 0);
      end
    join_none
    for (int m = 0; m < 20; m++) begin
      automatic bit mm[$];
      automatic int len = $urandom_range(1, 40);
      automatic sym_q_t q;
      for (int i = 0; i < len; i++) mm.push_back(1'($urandom()));
      q = ref_encode(3, 'b111, 'b101, mm);
      foreach (q[i]) begin exp_q.push_back(q[i]); exp_last.push_back(i == len - 1); end
      foreach (mm[i]) begin
        @(negedge clk);
        send(mm[i], i == len - 1);
        if ($urandom_range(0, 3) == 0) @(posedge clk);
      end
    end
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d symbols missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
