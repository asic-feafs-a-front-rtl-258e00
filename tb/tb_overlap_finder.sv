// tb_overlap_finder: random clusters on both layers, random offset and window.
// Reference: a cluster of either layer is kept when some valid cluster of the
// other layer satisfies |a1 + offset - a2| <= window, computed with integers.
// Also replays the example "window 0, offset 1": a layer-1 cluster in block 5
// keeps a layer-2 cluster in block 6 and drops one in block 5.
module tb_overlap_finder;
  import feafs_pkg::*;

  logic              clk = 1'b0;
  cluster_t [5:0]    l1, l2;
  cluster_t [11:0]   kept;
  logic signed [4:0] offset;
  logic [3:0]        window;
  int checks = 0, failures = 0;
  int n_kept = 0, n_dropped = 0;

  overlap_finder dut (.layer1(l1), .layer2(l2), .offset, .window, .kept);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_match(cluster_t a, cluster_t b, int off, int win);
    int d;
    d = int'(a.addr) + off - int'(b.addr);
    if (d < 0) d = -d;
    return a.valid && b.valid && d <= win;
  endfunction

  task automatic check_all();
    #1;
    for (int i = 0; i < 6; i++) begin
      bit k1, k2;
      k1 = 0; k2 = 0;
      for (int j = 0; j < 6; j++) begin
        k1 |= ref_match(l1[i], l2[j], int'(offset), int'(window));
        k2 |= ref_match(l1[j], l2[i], int'(offset), int'(window));
      end
      checks += 2;
      if (kept[i].valid !== k1 || kept[i].addr !== l1[i].addr || kept[i].width !== l1[i].width) begin
        failures++;
        $display("FAIL layer1 %0d off=%0d win=%0d", i, offset, window);
      end
      if (kept[6+i].valid !== k2 || kept[6+i].addr !== l2[i].addr) begin
        failures++;
        $display("FAIL layer2 %0d off=%0d win=%0d", i, offset, window);
      end
      if (l1[i].valid) begin
        if (k1) n_kept++; else n_dropped++;
      end
    end
  endtask

  initial begin
    // Example: window 0, offset 1
    l1 = '0; l2 = '0;
    l1[0] = '{valid: 1'b1, addr: 4'd5, width: 4'd2};
    l2[0] = '{valid: 1'b1, addr: 4'd6, width: 4'd1};
    l2[1] = '{valid: 1'b1, addr: 4'd5, width: 4'd1};
    offset = 5'sd1; window = 4'd0;
    #1;
    checks += 3;
    if (!kept[0].valid) begin failures++; $display("FAIL example: layer1 dropped"); end
    if (!kept[6].valid) begin failures++; $display("FAIL example: match dropped"); end
    if (kept[7].valid)  begin failures++; $display("FAIL example: mismatch kept"); end
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 6; i++) begin
        l1[i] = cluster_t'($urandom);
        l2[i] = cluster_t'($urandom);
        l1[i].valid = $urandom_range(1);
        l2[i].valid = $urandom_range(1);
      end
      offset = 5'($urandom);
      window = 4'($urandom_range(3));
      check_all();
    end
    checks++;
    if (n_kept == 0 || n_dropped == 0) begin
      failures++;
      $display("FAIL keep/drop not both exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
