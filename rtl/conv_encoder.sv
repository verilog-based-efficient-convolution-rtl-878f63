// conv_encoder: rate-1/2 feed-forward convolutional encoder.
//
// Each accepted input bit u produces one two-bit code symbol {y1, y0}. The
// K-1 previous input bits sit in a shift register (D1 = newest); the symbol
// is the parity of the K-bit word {u, D1 .. D(K-1)} masked by generator G1
// (for y1) and G0 (for y0). With the defaults (K = 3, G1 = 111, G0 = 101)
// y1 = u ^ D1 ^ D2 and y0 = u ^ D2, the two-flip-flop encoder of the
// reference design; input 1011 gives the symbols 11 10 00 01.
//
// Interface: valid/ready stream in (in_bit, in_last), valid/ready stream out
// (sym = {y1, y0}, sym_last). The output is a register stage: a symbol
// appears the cycle after its bit is accepted, and one bit per cycle is
// accepted while the output side is ready. in_last marks the final bit of a
// message: after it the shift register returns to the all-zero state so
// that the next message starts from state 0 (a choice of this design; the
// reference only encodes from reset). reset is synchronous and active high.
module conv_encoder
  import viterbi_pkg::*;
#(
  parameter int unsigned K  = K_DEFAULT,
  parameter int unsigned G1 = G1_DEFAULT,
  parameter int unsigned G0 = G0_DEFAULT
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       in_bit,
  input  logic       in_valid,
  input  logic       in_last,
  output logic       in_ready,
  output logic [1:0] sym,
  output logic       sym_valid,
  output logic       sym_last,
  input  logic       sym_ready
);

  logic [K-2:0] sr;     // {D1, ..., D(K-1)}
  logic         accept;

  assign in_ready = !sym_valid || sym_ready;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (reset) begin
      sr        <= '0;
      sym       <= '0;
      sym_valid <= 1'b0;
      sym_last  <= 1'b0;
    end else begin
      if (accept) begin
        sym       <= code_symbol(K, G1, G0, int'(sr), in_bit);
        sym_valid <= 1'b1;
        sym_last  <= in_last;
        sr        <= in_last ? '0 : {in_bit, sr[K-2:1]};
      end else if (sym_ready) begin
        sym_valid <= 1'b0;
      end
    end
  end

  initial assert (K >= 3 && K <= 16) else $error("conv_encoder: K out of range");

endmodule
