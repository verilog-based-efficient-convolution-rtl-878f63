// tb_traceback_unit: gives the traceback unit a behavioural survivor memory
// (asynchronous read) filled so that a known random input sequence is the
// survivor path of each block: along the path every decision bit equals the
// oldest state bit the path drops, other decisions are random. Blocks of
// random length, some back to back at full length, some ended as the last of
// a message. Checks the decoded bits and their order, out_last, that the
// first bit of a block appears LEN+1 clocks after its start (later only
// while the previous block is still being shifted out), and that with
// full-length back-to-back blocks `ready` never blocks a start.
module tb_traceback_unit;
  localparam int K = 3, TL = 8, NS = 4, AW = 4, LW = 4;
  logic clk = 0, reset = 1;
  logic start = 0, start_bank = 0, start_last = 0, ready;
  logic [LW-1:0] start_len = '0;
  logic [K-2:0] start_state = '0;
  logic [AW-1:0] raddr;
  logic [NS-1:0] rdata;
  logic out_bit, out_valid, out_last;
  logic [NS-1:0] mem [2*TL];
  int checks = 0, failures = 0;
  int cycle = 0;
  bit exp_bits[$]; bit exp_lastq[$];
  int exp_first[$];   // cycle in which the first bit of each block must appear
  bit first_of_block[$];
  int stalls = 0;
  int prev_last_cycle = 0;

  traceback_unit #(.K(K), .TL(TL)) dut (.*);
  assign rdata = mem[raddr];
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (!reset && out_valid) begin
    checks += 2;
    if (exp_bits.size() == 0) begin failures++; $display("extra output"); end
    else begin
      automatic bit e = exp_bits.pop_front();
      automatic bit el = exp_lastq.pop_front();
      automatic bit f = first_of_block.pop_front();
      if (out_bit !== e || out_last !== el) begin
        failures++; $display("bit got %b/%b exp %b/%b", out_bit, out_last, e, el);
      end
      if (f) begin
        automatic int ef = exp_first.pop_front();
        checks++;
        if (cycle != ef) begin failures++; $display("first bit at %0d exp %0d", cycle, ef); end
      end
    end
  end

  // Fill bank b with a block of len symbols following the inputs in u[]
  // from the random state s0; returns the final state.
  function automatic int fill(bit b, int len, bit u[$], int s0);
    int s = s0;
    for (int t = 0; t < len; t++) begin
      int ns = (int'(u[t]) << (K - 2)) | (s >> 1);
      mem[(b ? TL : 0) + t] = NS'($urandom());
      mem[(b ? TL : 0) + t][ns] = 1'(s & 1);
      s = ns;
    end
    return s;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit b = 0;
    repeat (2) @(posedge clk);
    reset <= 0;
    // phase 1: full-length blocks back to back, a start every TL clocks;
    // phase 2: random lengths with random gaps
    for (int blk = 0; blk < 60; blk++) begin
      automatic int len = (blk < 20) ? TL : $urandom_range(1, TL);
      automatic bit lst = (blk >= 20) && ($urandom_range(0, 2) == 0);
      automatic bit u[$];
      automatic int sf;
      for (int t = 0; t < len; t++) u.push_back(1'($urandom()));
      @(negedge clk);
      // the bank being refilled is not read while its traceback runs:
      // wait until a start can be taken before writing it
      while (!ready) begin
        if (blk < 20 && blk > 0) begin failures++; $display("stall on full blocks"); end
        stalls++;
        @(negedge clk);
      end
      sf = fill(b, len, u, $urandom_range(0, NS - 1));
      start = 1; start_bank = b; start_len = LW'(len); start_state = (K-1)'(sf); start_last = lst;
      foreach (u[t]) begin
        exp_bits.push_back(u[t]); exp_lastq.push_back(lst && t == len - 1); first_of_block.push_back(t == 0);
      end
      // valid after edge E+LEN (seen at the next edge), or right after the
      // previous block's last bit if the output is still busy then
      begin
        automatic int f = cycle + len + 1;
        if (f < prev_last_cycle + 1) f = prev_last_cycle + 1;
        exp_first.push_back(f);
        prev_last_cycle = f + len - 1;
      end
      @(negedge clk);
      start = 0;
      b = !b;
      if (blk < 20) repeat (TL - 1) @(negedge clk);
      else repeat ($urandom_range(0, 10)) @(negedge clk);
    end
    repeat (3 * TL) @(posedge clk);
    checks++;
    if (exp_bits.size() != 0) begin failures++; $display("%0d bits missing", exp_bits.size()); end
    checks++;
    if (stalls == 0) begin failures++; $display("ready never dropped"); end
    $display("traceback stalls seen: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
