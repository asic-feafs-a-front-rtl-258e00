// overlap_finder: coincidence (windowing) between the two sensor layers.
//
// Takes the up to 6 clusters kept on each layer and keeps a cluster of layer 1
// at block address a1 if some valid cluster of layer 2 at address a2 satisfies
//     |a1 + offset - a2| <= window
// and, symmetrically, keeps a layer 2 cluster if some layer 1 cluster matches
// it by the same rule. The offset corrects a position difference between the
// layers, the window is the allowed mismatch; both come from slow control. The
// rule and the 4-bit degraded address follow the document; the signed 5-bit
// offset and the symmetric keep rule (the output bus carries up to 12
// clusters) are this design's reading. Output slots 0..N-1 are layer 1,
// N..2N-1 layer 2. Purely combinational.
module overlap_finder
  import feafs_pkg::*;
#(
  parameter int unsigned N = 6
) (
  input  cluster_t [N-1:0]   layer1,
  input  cluster_t [N-1:0]   layer2,
  input  logic signed [4:0]  offset,
  input  logic [3:0]         window,
  output cluster_t [2*N-1:0] kept
);

  function automatic logic match(input logic [ADDR_W-1:0] a1,
                                 input logic [ADDR_W-1:0] a2,
                                 input logic signed [4:0] off,
                                 input logic [3:0] win);
    logic signed [6:0] d;
    d = $signed({3'b000, a1}) + 7'(off) - $signed({3'b000, a2});
    if (d < 0) d = -d;
    return d <= $signed({3'b000, win});
  endfunction

  logic [N-1:0][N-1:0] m;  // m[i][j]: layer1 i matches layer2 j

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        m[i][j] = layer1[i].valid && layer2[j].valid &&
                  match(layer1[i].addr, layer2[j].addr, offset, window);
    for (int i = 0; i < N; i++) begin
      kept[i]       = layer1[i];
      kept[i].valid = |m[i];
    end
    for (int j = 0; j < N; j++) begin
      logic any;
      any = 1'b0;
      for (int i = 0; i < N; i++) any |= m[i][j];
      kept[N+j]       = layer2[j];
      kept[N+j].valid = any;
    end
  end

endmodule
