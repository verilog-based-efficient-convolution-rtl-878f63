// viterbi_decoder: hard-decision Viterbi decoder for the rate-1/2 code.
//
// Datapath, one received symbol per clock:
//   branch_metric_unit  Hamming distance of the symbol to 00, 01, 10, 11
//   path_metric_unit    add-compare-select for all 2^(K-1) states, with
//                       min-subtraction so the best state has metric 0
//   path_metric_store   the register set of path metrics
//   survivor_memory     2*TL words of one decision bit per state
//   traceback_unit      walks the decisions back from the best state and
//                       emits the decoded bits in order
//
// The symbol stream is cut into blocks of TL symbols (the trellis length),
// or fewer when in_last ends a message. Blocks alternate between the two
// halves of the survivor memory: while the ACS writes block n into one
// half, the traceback reads block n-1 from the other. At the end of each
// block the traceback starts from the state with the best metric; path
// metrics carry on into the next block, and are re-initialised (state 0
// favoured) after in_last, because the encoder returns to state 0 after
// the last bit of a message. Each block is traced on its own, so the
// decision at the end of a block has no look-ahead past that block.
//
// Interface: valid/ready symbol stream in (in_sym = {y1, y0}, in_last);
// decoded bits out on out_bit/out_valid/out_last with no backpressure.
// in_ready only drops for a symbol that would end a block while the
// traceback is still busy with the previous one, which happens only
// when short messages follow each other. Latency: if the clock edge E
// accepts the last symbol of a block of LEN symbols, the block's first
// decoded bit is valid from edge E+LEN on (first sampled at edge E+LEN+1).
// reset is synchronous and active high.
// The stage split and the sizes (TL = 32, 4-bit metrics, 2*TL-word survivor
// memory) follow the source design; the block scheduling, handshakes and
// message-end handling are choices of this design. PMW must hold the
// metric spread; this is checked at elaboration.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int unsigned K   = K_DEFAULT,
  parameter int unsigned G1  = G1_DEFAULT,
  parameter int unsigned G0  = G0_DEFAULT,
  parameter int unsigned TL  = 32,
  parameter int unsigned PMW = 4,
  localparam int unsigned NS = 1 << (K - 1),
  localparam int unsigned AW = $clog2(2 * TL),
  localparam int unsigned TW = (TL > 1) ? $clog2(TL) : 1,
  localparam int unsigned LW = $clog2(TL + 1)
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [1:0] in_sym,
  input  logic       in_valid,
  input  logic       in_last,
  output logic       in_ready,
  output logic       out_bit,
  output logic       out_valid,
  output logic       out_last
);

  logic [1:0]     bm [4];
  logic [PMW-1:0] pm_old [NS];
  logic [PMW-1:0] pm_new [NS];
  logic [NS-1:0]  dec;
  logic [K-2:0]   best_state;
  logic [NS-1:0]  rdata;
  logic [AW-1:0]  raddr;
  logic           tb_ready;

  logic [TW-1:0]  wt;      // position inside the current block
  logic           bank;    // memory half being written
  logic           block_end;
  logic           accept;

  assign block_end = (wt == TW'(TL - 1)) || in_last;
  assign in_ready  = !block_end || tb_ready;
  assign accept    = in_valid && in_ready;

  branch_metric_unit u_bmu (
    .rx (in_sym),
    .bm (bm)
  );

  path_metric_unit #(.K(K), .G1(G1), .G0(G0), .PMW(PMW)) u_pmu (
    .pm_old     (pm_old),
    .bm         (bm),
    .pm_new     (pm_new),
    .dec        (dec),
    .best_state (best_state)
  );

  path_metric_store #(.K(K), .PMW(PMW)) u_pms (
    .clk    (clk),
    .reset  (reset),
    .init   (accept && in_last),
    .load   (accept),
    .pm_new (pm_new),
    .pm_old (pm_old)
  );

  survivor_memory #(.WIDTH(NS), .DEPTH(2 * TL)) u_mem (
    .clk   (clk),
    .we    (accept),
    .waddr (AW'(bank ? TL : 0) + AW'(wt)),
    .wdata (dec),
    .raddr (raddr),
    .rdata (rdata)
  );

  traceback_unit #(.K(K), .TL(TL)) u_tbu (
    .clk         (clk),
    .reset       (reset),
    .start       (accept && block_end),
    .start_bank  (bank),
    .start_len   (LW'(wt) + 1'b1),
    .start_state (best_state),
    .start_last  (in_last),
    .ready       (tb_ready),
    .raddr       (raddr),
    .rdata       (rdata),
    .out_bit     (out_bit),
    .out_valid   (out_valid),
    .out_last    (out_last)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      wt   <= '0;
      bank <= 1'b0;
    end else if (accept) begin
      if (block_end) begin
        wt   <= '0;
        bank <= !bank;
      end else begin
        wt <= wt + 1'b1;
      end
    end
  end

  // Normalised metrics stay below PM_INIT + 2*(K-2) while the start-up
  // offset washes out and below 2*(K-1) afterwards; both must fit in PMW bits.
  initial assert (((1 << (PMW - 1)) + 2 * (K - 2) < (1 << PMW)) && (2 * (K - 1) < (1 << PMW)))
    else $error("viterbi_decoder: PMW too small for K");

  // The traceback reads only the half the ACS is not writing.
  a_no_overlap: assert property (@(posedge clk) disable iff (reset)
                                 (accept && !tb_ready) |-> (raddr / AW'(TL)) != AW'(bank));

endmodule
