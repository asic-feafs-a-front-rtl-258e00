// reset_sync: reset management for one clock domain.
//
// The asynchronous chip reset clears the two flip-flops at once; the release
// goes through them, so the domain leaves reset two clock edges after the
// asynchronous reset is released, in step with its own clock. Used for the
// LHC-clock and link-clock domains and inside each dual-clock FIFO.
module reset_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);

  logic meta;

  always_ff @(posedge clk or negedge arst_n)
    if (!arst_n) {rst_n, meta} <= 2'b00;
    else         {rst_n, meta} <= {meta, 1'b1};

endmodule
