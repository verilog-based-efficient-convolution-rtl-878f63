// tb_top_encoder_decoder: the whole chain, encoder -> bit-error channel ->
// Viterbi decoder, at the default sizes (K = 3, generators 111/101,
// trellis length 32, survivor memory 64 x 4, 4-bit path metrics).
//  1. the worked example: message 1011 must be sent as 11 10 00 01; with
//     the third symbol received as 10 instead of 00 it must still come
//     back as 1011, and also without the error;
//  2. a long message streamed at one bit per clock over many trellis
//     blocks with one isolated channel error per block: input_ready stays
//     high and the message comes back exactly;
//  3. random messages with heavy channel errors, compared with the
//     software decoder in vit_ref_pkg;
//  4. short messages back to back, which stall the input.
// It counts how often each mechanism happened and fails if one never did:
// corrected channel errors, full trellis blocks, message-end blocks,
// blocks in each half of the survivor memory, path metric normalisation
// and input stalls.
module tb_top_encoder_decoder;
  import vit_ref_pkg::*;
  localparam int K = 3, G1 = 'b111, G0 = 'b101, TL = 32, PMW = 4;

  logic clk = 0, reset = 1;
  logic input_data = 0, input_valid = 0, input_last = 0, input_ready;
  logic [1:0] chan_err = '0;
  logic [1:0] encoded;
  logic encoded_valid, encoded_ready;
  logic out, out_valid, out_last;

  int checks = 0, failures = 0;
  int n_err_injected = 0, n_full_blocks = 0, n_last_blocks = 0;
  int n_bank [2] = '{0, 0};
  int n_norm = 0, n_stall = 0;

  top_encoder_decoder dut (.*);
  always #5 clk = ~clk;

  // channel: error pattern per transferred symbol
  bit [1:0] err_plan[$];
  int xfer = 0;
  bit [1:0] exp_enc[$];
  always @(posedge clk) if (!reset && encoded_valid && encoded_ready) begin
    checks++;
    if (exp_enc.size() == 0) begin failures++; $display("unexpected encoded symbol"); end
    else begin
      automatic bit [1:0] e = exp_enc.pop_front();
      if (encoded !== e) begin failures++; $display("encoded %b exp %b", encoded, e); end
    end
    if (chan_err != 0) n_err_injected++;
    xfer <= xfer + 1;
  end
  always @(negedge clk) chan_err = (xfer < err_plan.size()) ? err_plan[xfer] : 2'b00;

  // decoded output
  bit exp_bits[$]; bit exp_last[$];
  always @(posedge clk) if (!reset && out_valid) begin
    checks++;
    if (exp_bits.size() == 0) begin failures++; $display("extra output bit"); end
    else begin
      automatic bit e = exp_bits.pop_front();
      automatic bit el = exp_last.pop_front();
      if (out !== e || out_last !== el) begin
        failures++; $display("out got %b/%b exp %b/%b", out, out_last, e, el);
      end
    end
  end

  // mechanism counters, watched inside the decoder
  always @(posedge clk) if (!reset) begin
    if (dut.u_decoder.accept && dut.u_decoder.block_end) begin
      n_bank[dut.u_decoder.bank]++;
      if (dut.u_decoder.in_last) n_last_blocks++; else n_full_blocks++;
    end
    if (dut.u_decoder.accept && dut.u_decoder.u_pmu.min_sum != 0) n_norm++;
    if (input_valid && !input_ready) n_stall++;
  end

  task automatic send_msg(bit msg[$], bit [1:0] errs[$], bit gaps);
    automatic sym_q_t syms = ref_encode(K, G1, G0, msg);
    automatic bit lasts[$];
    automatic bit_q_t refb;
    foreach (syms[i]) begin
      exp_enc.push_back(syms[i]);
      err_plan.push_back(errs[i]);
      syms[i] ^= errs[i];
      lasts.push_back(i == msg.size() - 1);
    end
    refb = ref_decode(K, G1, G0, TL, 1 << (PMW - 1), syms, lasts);
    foreach (refb[i]) begin exp_bits.push_back(refb[i]); exp_last.push_back(lasts[i]); end
    foreach (msg[i]) begin
      @(negedge clk);
      input_data = msg[i]; input_last = lasts[i]; input_valid = 1;
      @(posedge clk);
      while (!input_ready) @(posedge clk);
      #1 input_valid = 0;
      if (gaps && $urandom_range(0, 7) == 0) @(negedge clk);
    end
  endtask

  task automatic drain();
    int n = 0;
    while (exp_bits.size() != 0 && n < 20 * TL + 100) begin @(posedge clk); n++; end
    checks++;
    if (exp_bits.size() != 0) begin failures++; $display("%0d bits missing", exp_bits.size()); end
  endtask

  function automatic void expect_equal(bit_q_t a, bit_q_t b, string what);
    checks++;
    if (a != b) begin failures++; $display("%s: reference decode differs from message", what); end
  endfunction

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;

    // 1. worked example, with and without the channel error
    begin
      automatic bit msg[$] = '{1, 0, 1, 1};
      automatic bit [1:0] err[$] = '{2'b00, 2'b00, 2'b10, 2'b00};
      automatic bit [1:0] none[$] = '{2'b00, 2'b00, 2'b00, 2'b00};
      automatic int first = exp_bits.size();
      send_msg(msg, err, 0);
      // the decoded bits must be the message itself
      checks++;
      if (exp_bits.size() != first + 4 || exp_bits[first] != 1 || exp_bits[first+1] != 0 ||
          exp_bits[first+2] != 1 || exp_bits[first+3] != 1) begin
        failures++; $display("worked example: reference does not decode 1011");
      end
      send_msg(msg, none, 0);
      drain();
    end

    // 2. long stream at full rate, one channel error per block
    begin
      automatic bit msg[$];
      automatic bit [1:0] err[$];
      automatic int nblk = 16;
      automatic int ready_low = 0;
      for (int i = 0; i < nblk * TL; i++) begin msg.push_back(1'($urandom())); err.push_back(2'b00); end
      for (int b = 0; b < nblk; b++) err[b * TL + $urandom_range(2 * K, TL - 4 * K)] = 2'($urandom_range(1, 2));
      // the message itself is the expected output here
      foreach (msg[i]) begin exp_bits.push_back(msg[i]); exp_last.push_back(i == msg.size() - 1); end
      foreach (msg[i]) begin exp_enc.push_back(2'b00); end
      begin
        automatic sym_q_t s = ref_encode(K, G1, G0, msg);
        foreach (s[i]) exp_enc[exp_enc.size() - msg.size() + i] = s[i];
      end
      foreach (err[i]) err_plan.push_back(err[i]);
      foreach (msg[i]) begin
        @(negedge clk);
        input_data = msg[i]; input_last = (i == msg.size() - 1); input_valid = 1;
        #1 if (!input_ready) ready_low++;
        @(posedge clk);
        while (!input_ready) @(posedge clk);
      end
      @(negedge clk) input_valid = 0;
      checks++;
      if (ready_low != 0) begin failures++; $display("full-rate stream stalled %0d times", ready_low); end
      drain();
    end

    // 3. random messages, heavy errors, against the reference decoder
    for (int m = 0; m < 30; m++) begin
      automatic bit msg[$];
      automatic bit [1:0] err[$];
      automatic int len = (m % 3 == 0) ? $urandom_range(TL, 4 * TL) : $urandom_range(1, TL);
      for (int i = 0; i < len; i++) begin
        msg.push_back(1'($urandom()));
        err.push_back(($urandom_range(0, 7) == 0) ? 2'($urandom_range(1, 3)) : 2'b00);
      end
      send_msg(msg, err, 1);
    end
    drain();

    // 4. short messages back to back
    for (int m = 0; m < 20; m++) begin
      automatic bit msg[$];
      automatic bit [1:0] err[$];
      automatic int len = $urandom_range(1, 3);
      for (int i = 0; i < len; i++) begin msg.push_back(1'($urandom())); err.push_back(2'b00); end
      send_msg(msg, err, 0);
    end
    drain();

    $display("errors injected=%0d full blocks=%0d message-end blocks=%0d bank0=%0d bank1=%0d normalisations=%0d stalls=%0d",
             n_err_injected, n_full_blocks, n_last_blocks, n_bank[0], n_bank[1], n_norm, n_stall);
    checks += 7;
    if (n_err_injected == 0) begin failures++; $display("no channel error injected"); end
    if (n_full_blocks == 0)  begin failures++; $display("no full trellis block"); end
    if (n_last_blocks == 0)  begin failures++; $display("no message-end block"); end
    if (n_bank[0] == 0)      begin failures++; $display("memory half 0 unused"); end
    if (n_bank[1] == 0)      begin failures++; $display("memory half 1 unused"); end
    if (n_norm == 0)         begin failures++; $display("no metric normalisation"); end
    if (n_stall == 0)        begin failures++; $display("no input stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
