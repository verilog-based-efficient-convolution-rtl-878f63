// tb_viterbi_decoder: end-to-end check of the Viterbi decoder on its own.
//  - the worked trellis example: received 11 10 10 01 (one bit in error)
//    and the clean 11 10 00 01 must both decode to 1011;
//  - a long continuous stream at one symbol per clock (many trellis
//    blocks, both memory halves): in_ready must stay high, and with one
//    isolated bit error per block, away from the block ends, the message
//    must come back exactly;
//  - random messages, random gaps and heavy random errors, compared bit by
//    bit with the software decoder in vit_ref_pkg;
//  - short messages back to back, which must make in_ready drop.
// The code and trellis length are set by the localparams below.
module tb_viterbi_decoder;
  import vit_ref_pkg::*;
  localparam int K = 3, G1 = 'b111, G0 = 'b101, TL = 32, PMW = 4;

  logic clk = 0, reset = 1;
  logic [1:0] in_sym = '0;
  logic in_valid = 0, in_last = 0, in_ready;
  logic out_bit, out_valid, out_last;
  int checks = 0, failures = 0;
  int stalls = 0, corrected = 0, blocks_full = 0;

  viterbi_decoder #(.K(K), .G1(G1), .G0(G0), .TL(TL), .PMW(PMW)) dut (.*);
  always #5 clk = ~clk;

  bit exp_bits[$]; bit exp_last[$];
  always @(posedge clk) if (!reset && out_valid) begin
    checks++;
    if (exp_bits.size() == 0) begin failures++; $display("extra output bit"); end
    else begin
      automatic bit e = exp_bits.pop_front();
      automatic bit el = exp_last.pop_front();
      if (out_bit !== e || out_last !== el) begin
        failures++; $display("out got %b/%b exp %b/%b", out_bit, out_last, e, el);
      end
    end
  end

  task automatic send_sym(bit [1:0] s, bit l, bit count_stall);
    @(negedge clk);
    in_sym = s; in_last = l; in_valid = 1;
    #1;
    while (!in_ready) begin
      if (count_stall) stalls++;
      @(negedge clk);
    end
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  task automatic drain();
    int n = 0;
    while (exp_bits.size() != 0 && n < 10 * TL + 100) begin @(posedge clk); n++; end
    checks++;
    if (exp_bits.size() != 0) begin failures++; $display("%0d bits missing", exp_bits.size()); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    reset <= 0;

    if (K == 3 && G1 == 'b111 && G0 == 'b101) begin
      automatic bit [1:0] rx_err[4] = '{2'b11, 2'b10, 2'b10, 2'b01};
      automatic bit [1:0] rx_ok[4]  = '{2'b11, 2'b10, 2'b00, 2'b01};
      automatic bit dec[4] = '{1, 0, 1, 1};
      foreach (dec[i]) begin exp_bits.push_back(dec[i]); exp_last.push_back(i == 3); end
      foreach (rx_err[i]) send_sym(rx_err[i], i == 3, 0);
      foreach (dec[i]) begin exp_bits.push_back(dec[i]); exp_last.push_back(i == 3); end
      foreach (rx_ok[i]) send_sym(rx_ok[i], i == 3, 0);
      drain();
      corrected++;
    end

    // continuous stream, one symbol per clock, one error per block
    begin
      automatic bit msg[$];
      automatic sym_q_t syms;
      automatic int nblk = 12;
      for (int i = 0; i < nblk * TL; i++) msg.push_back(1'($urandom()));
      syms = ref_encode(K, G1, G0, msg);
      for (int b = 0; b < nblk; b++) begin
        // away from both block ends (the middle of the block for long codes)
        automatic int lo = (2 * K < TL / 2) ? 2 * K : TL / 2;
        automatic int hi = (TL - 4 * K > lo) ? TL - 4 * K : lo;
        automatic int pos = b * TL + $urandom_range(lo, hi);
        syms[pos] ^= 2'(1 << $urandom_range(0, 1));
      end
      foreach (msg[i]) begin exp_bits.push_back(msg[i]); exp_last.push_back(i == msg.size() - 1); end
      @(negedge clk);
      foreach (syms[i]) begin
        in_sym = syms[i]; in_last = (i == syms.size() - 1); in_valid = 1;
        #1;
        checks++;
        if (!in_ready) begin failures++; $display("in_ready low in continuous stream"); end
        @(negedge clk);
      end
      in_valid = 0;
      blocks_full += nblk;
      corrected += nblk;
      drain();
    end

    // random messages with heavy errors against the reference decoder
    for (int m = 0; m < 40; m++) begin
      automatic bit msg[$];
      automatic bit lasts[$];
      automatic sym_q_t syms;
      automatic bit_q_t refb;
      automatic int len = (m % 4 == 0) ? $urandom_range(TL, 3 * TL) : $urandom_range(1, TL);
      for (int i = 0; i < len; i++) msg.push_back(1'($urandom()));
      syms = ref_encode(K, G1, G0, msg);
      foreach (syms[i]) begin
        if ($urandom_range(0, 9) == 0) syms[i] ^= 2'($urandom_range(1, 3));
        lasts.push_back(i == len - 1);
      end
      refb = ref_decode(K, G1, G0, TL, 1 << (PMW - 1), syms, lasts);
      foreach (refb[i]) begin exp_bits.push_back(refb[i]); exp_last.push_back(i == len - 1); end
      foreach (syms[i]) begin
        send_sym(syms[i], lasts[i], 1);
        if ($urandom_range(0, 7) == 0) @(negedge clk);
      end
    end
    drain();

    // back-to-back short messages make the traceback the bottleneck
    for (int m = 0; m < 20; m++) begin
      automatic bit msg[$];
      automatic sym_q_t syms;
      automatic int len = $urandom_range(1, 3);
      for (int i = 0; i < len; i++) msg.push_back(1'($urandom()));
      syms = ref_encode(K, G1, G0, msg);
      foreach (msg[i]) begin exp_bits.push_back(msg[i]); exp_last.push_back(i == len - 1); end
      foreach (syms[i]) send_sym(syms[i], i == len - 1, 1);
    end
    drain();

    checks++;
    if (stalls == 0) begin failures++; $display("in_ready never dropped"); end
    $display("stalls=%0d corrected_blocks=%0d full_blocks=%0d", stalls, corrected, blocks_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
