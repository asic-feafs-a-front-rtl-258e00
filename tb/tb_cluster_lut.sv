// tb_cluster_lut: exhaustive check of the 16-entry cluster look-up table.
// For every 4-strip pattern the expected clusters (runs of hits) are worked
// out by scanning the bits, and compared field by field with the table word.
module tb_cluster_lut;
  import feafs_pkg::*;

  logic       clk = 1'b0;
  logic [3:0] strips;
  lut_word_t  clusters;
  int checks = 0, failures = 0;

  cluster_lut dut (.strips, .clusters);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_clus(input lut_clus_t got, input bit v, input int st,
                            input int ln, input string what);
    checks++;
    if (got.valid !== v ||
        (v && (got.start != 2'(st) || got.len != 3'(ln) ||
               got.at_low != (st == 0) || got.at_high != (st + ln == 4)))) begin
      failures++;
      $display("FAIL %s pattern %b: got %p expected v=%0d start=%0d len=%0d",
               what, strips, got, v, st, ln);
    end
  endtask

  initial begin
    for (int p = 0; p < 16; p++) begin
      int st[2], ln[2], n;
      strips = 4'(p);
      #1;
      n = 0;
      st = '{0, 0};
      ln = '{0, 0};
      for (int s = 0; s < 4; s++) begin
        if (p[s] && (s == 0 || !p[s-1])) begin
          st[n] = s;
          ln[n] = 0;
          for (int t = s; t < 4 && p[t]; t++) ln[n]++;
          n++;
        end
      end
      check_clus(clusters.c0, n > 0, st[0], ln[0], "c0");
      check_clus(clusters.c1, n > 1, st[1], ln[1], "c1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
