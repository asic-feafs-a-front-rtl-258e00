// cluster_prio_enc: reduces a cluster bus to its first N_OUT valid entries.
//
// Slots are scanned from index 0 upward (lowest block address first) and the
// first N_OUT valid clusters are packed into the output bus, in that order,
// with the unused outputs invalid. Clusters beyond N_OUT are lost; their number
// is given on n_lost for the monitoring counter, and n_out tells how many
// outputs are valid. The chip uses it twice: 32 to 6 clusters per layer after
// the width cut, and 12 to 4 clusters after the overlap finding. Scanning
// order and the loss count are this design's choices. Purely combinational.
module cluster_prio_enc
  import feafs_pkg::*;
#(
  parameter int unsigned N_IN  = CLUS_PER_LAYER,
  parameter int unsigned N_OUT = 6
) (
  input  cluster_t [N_IN-1:0]      clusters_in,
  output cluster_t [N_OUT-1:0]     clusters_out,
  output logic [$clog2(N_OUT+1)-1:0] n_out,
  output logic [$clog2(N_IN+1)-1:0]  n_lost
);

  always_comb begin
    int unsigned k;
    int unsigned lost;
    k    = 0;
    lost = 0;
    clusters_out = '0;
    for (int unsigned i = 0; i < N_IN; i++) begin
      if (clusters_in[i].valid) begin
        if (k < N_OUT) begin
          clusters_out[k] = clusters_in[i];
          k++;
        end else begin
          lost++;
        end
      end
    end
    n_out  = ($clog2(N_OUT+1))'(k);
    n_lost = ($clog2(N_IN+1))'(lost);
  end

endmodule
