// traceback_unit: survivor path tracing and in-order output of decoded bits.
//
// When a block of LEN (1..TL) symbols has been through the add-compare-select,
// `start` hands over the block's memory half (`start_bank`), its length and
// the state with the best path metric after its last symbol. The unit then
// walks the survivor memory backwards, one trellis step per clock: in the
// word of time t it reads the decision bit of the current state s, the
// decoded bit of time t is the newest bit of s (s[K-2]), and the previous
// state is {s[K-3:0], decision}. The bits, found last-first, are collected
// in a TL-bit register and then shifted out first-first, one per clock, on
// out_bit/out_valid, out_last marking the final bit of a message.
//
// Timing: a block of LEN symbols whose start is taken on clock edge E is
// traced on edges E+1 .. E+LEN; its first bit is valid right after edge
// E+LEN and its bits follow on consecutive cycles. `ready` tells the
// decoder when a start can be taken; with back-to-back blocks of TL symbols
// it is always high, so the decoder runs at one symbol per clock. There is
// no backpressure on the output. reset is synchronous and active high.
// Tracing back from the end of the survivor path follows the source design;
// block-wise tracing, the output reordering register and the ready
// handshake are choices of this design.
module traceback_unit #(
  parameter int unsigned K  = 3,
  parameter int unsigned TL = 32,
  localparam int unsigned NS = 1 << (K - 1),
  localparam int unsigned AW = $clog2(2 * TL),
  localparam int unsigned TW = (TL > 1) ? $clog2(TL) : 1,
  localparam int unsigned LW = $clog2(TL + 1)
) (
  input  logic          clk,
  input  logic          reset,
  // block hand-over from the decoder
  input  logic          start,
  input  logic          start_bank,
  input  logic [LW-1:0] start_len,
  input  logic [K-2:0]  start_state,
  input  logic          start_last,
  output logic          ready,
  // survivor memory read port (asynchronous read)
  output logic [AW-1:0] raddr,
  input  logic [NS-1:0] rdata,
  // decoded bits
  output logic          out_bit,
  output logic          out_valid,
  output logic          out_last
);

  // trace phase
  logic          tracing;
  logic          bank;
  logic [TW-1:0] t;
  logic [K-2:0]  s;
  logic          blk_last;
  logic [LW-1:0] blk_len;
  logic [TL-1:0] tb_bits;
  logic [TL-1:0] next_bits;
  logic          pending;
  logic          pend_last;
  logic [LW-1:0] pend_len;

  // output phase
  logic          out_active;
  logic [TL-1:0] out_bits;
  logic [TW-1:0] out_idx;
  logic [LW-1:0] out_len;
  logic          out_is_last;
  logic          out_free;
  logic          trace_done;

  assign raddr      = AW'(bank ? TL : 0) + AW'(t);
  assign out_free   = !out_active || (LW'(out_idx) == out_len - 1'b1);
  assign trace_done = tracing && (t == '0);
  assign ready      = !pending && (!tracing || (trace_done && out_free));

  always_comb begin
    next_bits    = tb_bits;
    next_bits[t] = s[K-2];
  end

  assign out_bit   = out_bits[out_idx];
  assign out_valid = out_active;
  assign out_last  = out_active && out_is_last && (LW'(out_idx) == out_len - 1'b1);

  always_ff @(posedge clk) begin
    if (reset) begin
      tracing     <= 1'b0;
      pending     <= 1'b0;
      out_active  <= 1'b0;
      bank        <= 1'b0;
      t           <= '0;
      s           <= '0;
      blk_last    <= 1'b0;
      blk_len     <= '0;
      tb_bits     <= '0;
      pend_last   <= 1'b0;
      pend_len    <= '0;
      out_bits    <= '0;
      out_idx     <= '0;
      out_len     <= '0;
      out_is_last <= 1'b0;
    end else begin
      // output shifter
      if (out_active) begin
        if (LW'(out_idx) == out_len - 1'b1) out_active <= 1'b0;
        else                                 out_idx    <= out_idx + 1'b1;
      end

      // trace one step per clock
      if (tracing) begin
        tb_bits <= next_bits;
        s       <= {s[K-3:0], rdata[s]};
        if (trace_done) begin
          tracing <= 1'b0;
          if (out_free) begin
            out_bits    <= next_bits;
            out_len     <= blk_len;
            out_is_last <= blk_last;
            out_idx     <= '0;
            out_active  <= 1'b1;
          end else begin
            pending   <= 1'b1;
            pend_len  <= blk_len;
            pend_last <= blk_last;
          end
        end else begin
          t <= t - 1'b1;
        end
      end else if (pending && out_free) begin
        pending     <= 1'b0;
        out_bits    <= tb_bits;
        out_len     <= pend_len;
        out_is_last <= pend_last;
        out_idx     <= '0;
        out_active  <= 1'b1;
      end

      // take a new block (may coincide with the last step of the previous one)
      if (start && ready) begin
        tracing  <= 1'b1;
        bank     <= start_bank;
        t        <= TW'(start_len - 1'b1);
        s        <= start_state;
        blk_len  <= start_len;
        blk_last <= start_last;
      end
    end
  end

  initial assert (K >= 3 && TL >= 1) else $error("traceback_unit: bad parameters");

  // A start is only offered when it can be taken.
  a_start_ready: assert property (@(posedge clk) disable iff (reset) start |-> ready);
  a_start_len:   assert property (@(posedge clk) disable iff (reset)
                                  start |-> (start_len >= 1 && start_len <= LW'(TL)));

endmodule
