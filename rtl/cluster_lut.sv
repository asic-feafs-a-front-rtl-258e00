// cluster_lut: the 16-entry by 16-bit look-up table of one 4-strip block.
//
// The 4 comparator bits of a block address the table; the 16-bit word holds up
// to two clusters (a block of 4 strips can hold at most two separate runs of
// hits). Each cluster is given as its first strip, its length inside the block
// and two flags telling whether it touches the lower or the upper edge of the
// block; the neighbouring mergers use the flags to join clusters that cross a
// block boundary. The table size (16 x 16 bits, up to 2 clusters per block)
// follows the document; the layout of the word is this design's own. The table
// is filled by a function evaluated on constant addresses. Purely combinational.
module cluster_lut
  import feafs_pkg::*;
(
  input  logic [3:0] strips,  // strips[0] is the lowest strip of the block
  output lut_word_t  clusters
);

  function automatic lut_word_t lut_entry(input logic [3:0] p);
    lut_word_t  w;
    lut_clus_t  cur;
    int         n;
    w   = '0;
    cur = '0;
    n   = 0;
    for (int s = 0; s < 4; s++) begin
      if (p[s]) begin
        if (s == 0 || !p[s-1]) begin
          cur        = '0;
          cur.valid  = 1'b1;
          cur.start  = 2'(s);
          cur.at_low = (s == 0);
        end
        cur.len = cur.len + 3'd1;
        if (s == 3 || !p[s+1]) begin
          cur.at_high = (s == 3);
          if (n == 0) w.c0 = cur;
          else        w.c1 = cur;
          n++;
        end
      end
    end
    return w;
  endfunction

  // The table contents are constants: synthesis reduces them to a ROM.
  lut_table_t table_q;

  always_comb
    for (int i = 0; i < 16; i++) table_q[i] = lut_entry(4'(i));

  assign clusters = table_q[strips];

endmodule
