// branch_metric_unit: hard-decision branch metrics.
//
// For a received two-bit symbol it gives the Hamming distance to each of
// the four possible code symbols: bm[c] = number of differing bits between
// rx and c, for c = 00, 01, 10, 11. The path metric unit then picks, for
// every trellis branch, the metric of the symbol that branch would have
// sent. Purely combinational; the 2-bit metrics range 0..2.
// Hard-decision Hamming metrics against the four code words are those of
// the source design; making the unit purely combinational is a choice here.
module branch_metric_unit (
  input  logic [1:0] rx,
  output logic [1:0] bm [4]
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      bm[c] = 2'(rx[1] ^ c[1]) + 2'(rx[0] ^ c[0]);
    end
  end

endmodule
