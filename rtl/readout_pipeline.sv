// readout_pipeline: keeps the strip data until the level-1 trigger decision.
//
// A shift register of DEPTH columns of WIDTH bits, clocked by the LHC clock:
// every cycle the column of strips presented at din enters the first cell and
// each column moves one cell on. dout is the column that entered DEPTH cycles
// earlier; when an L1 accept arrives, the caller copies dout into the readout
// FIFO. The 128 strips and the 135 columns (T+1 .. T+135) follow the document;
// that the L1 decision latency equals the pipeline depth is implied by it.
// No reset: the content is data only, and the first DEPTH cycles after power-up
// carry no event.
module readout_pipeline #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 135
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] cells [DEPTH];

  always_ff @(posedge clk) begin
    cells[0] <= din;
    for (int i = 1; i < DEPTH; i++) cells[i] <= cells[i-1];
  end

  assign dout = cells[DEPTH-1];

endmodule
