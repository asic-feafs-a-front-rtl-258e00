// cluster_research: finds the clusters on the 64 strips of one sensor layer.
//
// The layer is cut into 16 blocks of 4 strips. One cluster_lut per block gives
// up to two clusters inside the block, so the output bus has 32 cluster slots:
// slot 2k and 2k+1 belong to block k (2k is the lower one). A cluster that
// crosses a block boundary is merged: the arbiter gives it to the block where
// it starts, which therefore reports its full width, and the continuation seen
// by the next block(s) is suppressed. The width of a cluster running through
// several blocks is obtained with a chain over the blocks (a fully hit block
// adds 4 strips and passes on). Widths saturate at 15. The cluster address is
// the 4-bit block address. Block granularity, the LUT-per-block structure, the
// boundary merger and the single-cycle operation follow the document; the
// "lower block wins" arbitration rule and the width chain are this design's
// choices. Purely combinational: the caller registers the result, so cluster
// research takes one clock cycle.
module cluster_research
  import feafs_pkg::*;
(
  input  logic [LAYER_STRIPS-1:0]      strips,   // strips[0]: first strip
  output cluster_t [CLUS_PER_LAYER-1:0] clusters
);

  lut_word_t lut [N_BLOCKS];

  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_lut
    cluster_lut u_lut (.strips(strips[4*b +: 4]), .clusters(lut[b]));
  end

  // cont[j]: number of hit strips running upward from strip 0 of block j,
  // continued through fully hit blocks; saturates at 15.
  logic [4:0] cont [N_BLOCKS+1];

  always_comb begin
    cont[N_BLOCKS] = '0;
    for (int j = N_BLOCKS - 1; j >= 0; j--) begin
      if (strips[4*j +: 4] == 4'b1111)
        cont[j] = (cont[j+1] > 5'd11) ? 5'd15 : cont[j+1] + 5'd4;
      else if (lut[j].c0.at_low)
        cont[j] = {2'b00, lut[j].c0.len};
      else
        cont[j] = '0;
    end
  end

  function automatic cluster_t make_cluster(input lut_clus_t c, input int blk,
                                            input logic prev_hit,
                                            input logic [4:0] next_cont);
    cluster_t   r;
    logic [5:0] w;
    r = '0;
    w = {3'b000, c.len};
    if (c.at_high) w = w + {1'b0, next_cont};
    r.valid = c.valid && !(c.at_low && prev_hit);
    r.addr  = ADDR_W'(blk);
    r.width = (w > 6'd15) ? 4'd15 : w[3:0];
    return r;
  endfunction

  always_comb begin
    for (int b = 0; b < N_BLOCKS; b++) begin
      logic prev_hit;
      prev_hit = (b > 0) ? strips[4*b-1] : 1'b0;
      clusters[2*b]   = make_cluster(lut[b].c0, b, prev_hit, cont[b+1]);
      clusters[2*b+1] = make_cluster(lut[b].c1, b, 1'b0,     cont[b+1]);
    end
  end

endmodule
