// tb_cluster_research: checks the clusters found on 64 strips.
// Reference: every run of consecutive hits is one cluster, owned by the block
// of its first strip, with its full length (saturated at 15) as width; a run
// goes to slot 2k+1 of its block k if hits of another run lie below it in the
// block (even the tail of a run owned by block k-1), otherwise to slot 2k.
// Directed patterns cover clusters crossing one and several block boundaries;
// random patterns at several occupancies follow.
module tb_cluster_research;
  import feafs_pkg::*;

  logic                          clk = 1'b0;
  logic [LAYER_STRIPS-1:0]       strips;
  cluster_t [CLUS_PER_LAYER-1:0] clusters;
  int checks = 0, failures = 0;
  int merged = 0;

  cluster_research dut (.strips, .clusters);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pattern();
    cluster_t exp [CLUS_PER_LAYER];
    for (int i = 0; i < CLUS_PER_LAYER; i++) exp[i] = '0;
    for (int s = 0; s < LAYER_STRIPS; s++) begin
      if (strips[s] && (s == 0 || !strips[s-1])) begin
        int len, blk, slot;
        len = 0;
        for (int t = s; t < LAYER_STRIPS && strips[t]; t++) len++;
        blk  = s / 4;
        // second slot if the block already holds the start or the end of
        // another run below strip s
        slot = 2*blk;
        for (int t = 4*blk; t < s; t++) if (strips[t]) slot = 2*blk + 1;
        exp[slot].valid = 1'b1;
        exp[slot].addr  = 4'(blk);
        exp[slot].width = (len > 15) ? 4'd15 : 4'(len);
        if ((s % 4) + len > 4) merged++;
      end
    end
    #1;
    for (int i = 0; i < CLUS_PER_LAYER; i++) begin
      checks++;
      if (clusters[i].valid !== exp[i].valid ||
          (exp[i].valid && clusters[i] !== exp[i])) begin
        failures++;
        if (failures < 10)
          $display("FAIL strips=%h slot %0d got %p expected %p",
                   strips, i, clusters[i], exp[i]);
      end
    end
  endtask

  initial begin
    strips = '0;                          check_pattern();
    strips = 64'h0000_0000_0000_0018;     check_pattern(); // crosses 1 boundary
    strips = 64'h0000_0000_0000_0FF8;     check_pattern(); // spans 3 blocks
    strips = 64'hFFFF_FFFF_FFFF_FFFF;     check_pattern(); // saturates
    strips = 64'h5555_5555_5555_5555;     check_pattern(); // 2 per block
    strips = 64'h8000_0000_0000_0001;     check_pattern(); // edges
    strips = 64'hF0F0_0F0F_3C3C_6666;     check_pattern();
    for (int n = 0; n < 4000; n++) begin
      int occ;
      occ = 1 + (n % 50);
      for (int s = 0; s < LAYER_STRIPS; s++) strips[s] = ($urandom_range(99) < occ);
      check_pattern();
    end
    checks++;
    if (merged == 0) begin
      failures++;
      $display("FAIL no boundary-crossing cluster was exercised");
    end
    $display("boundary-crossing clusters checked: %0d", merged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
