// survivor_memory: dual-port memory of add-compare-select decisions.
//
// One word per received symbol, one bit per trellis state (the decision of
// that state's ACS). DEPTH is twice the trellis length so that it holds two
// blocks: the decoder writes the decisions of the current block into one
// half while the traceback reads the previous block from the other half.
// One write port (synchronous: written on the clock edge when we is high)
// and one read port with an asynchronous (combinational) read, so the
// traceback can follow one trellis step per clock. No reset: a word is
// always written before it is read.
// Depth, width, port split and the asynchronous read follow the source
// design (64 x 16 for its K = 5 sizing).
module survivor_memory #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
