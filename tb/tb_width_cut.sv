// tb_width_cut: random clusters and thresholds; a cluster must survive
// exactly when it is valid and its width does not exceed the threshold, and
// its address and width must pass unchanged.
module tb_width_cut;
  import feafs_pkg::*;

  logic                          clk = 1'b0;
  cluster_t [CLUS_PER_LAYER-1:0] cin, cout;
  logic [WIDTH_W-1:0]            threshold;
  int checks = 0, failures = 0;

  width_cut dut (.clusters_in(cin), .threshold, .clusters_out(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < CLUS_PER_LAYER; i++) cin[i] = cluster_t'($urandom);
      threshold = 4'($urandom);
      #1;
      for (int i = 0; i < CLUS_PER_LAYER; i++) begin
        bit keep;
        keep = cin[i].valid && (int'(cin[i].width) <= int'(threshold));
        checks++;
        if (cout[i].valid !== keep || cout[i].addr !== cin[i].addr ||
            cout[i].width !== cin[i].width) begin
          failures++;
          $display("FAIL thr=%0d in=%p out=%p", threshold, cin[i], cout[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
