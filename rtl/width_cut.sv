// width_cut: the "cut on width" (threshold cut) stage of one layer.
//
// Every cluster wider than the programmable cluster threshold is removed from
// the bus (its valid bit is cleared); the others pass unchanged. The trigger is
// meant to keep only narrow clusters (high transverse momentum tracks), so a
// threshold of 2 keeps clusters of 1 and 2 strips. The threshold comes from the
// slow-control register file. Comparing "width <= threshold" is this design's
// reading of a cut whose exact rule the document does not state.
// Purely combinational.
module width_cut
  import feafs_pkg::*;
#(
  parameter int unsigned N = CLUS_PER_LAYER
) (
  input  cluster_t [N-1:0]   clusters_in,
  input  logic [WIDTH_W-1:0] threshold,
  output cluster_t [N-1:0]   clusters_out
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      clusters_out[i]       = clusters_in[i];
      clusters_out[i].valid = clusters_in[i].valid &&
                              (clusters_in[i].width <= threshold);
    end
  end

endmodule
