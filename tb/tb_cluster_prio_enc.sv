// tb_cluster_prio_enc: the 32-to-6 encoder (default parameters) and a
// 12-to-4 instance are fed random buses of varying density; the outputs must
// be the first valid inputs in index order, and n_out / n_lost must count
// them.
module tb_cluster_prio_enc;
  import feafs_pkg::*;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int overflows = 0;

  cluster_t [31:0] a_in;
  cluster_t [5:0]  a_out;
  logic [2:0]      a_n;
  logic [5:0]      a_lost;
  cluster_t [11:0] b_in;
  cluster_t [3:0]  b_out;
  logic [2:0]      b_n;
  logic [3:0]      b_lost;

  cluster_prio_enc dut_a (.clusters_in(a_in), .clusters_out(a_out), .n_out(a_n), .n_lost(a_lost));
  cluster_prio_enc #(.N_IN(12), .N_OUT(4)) dut_b
    (.clusters_in(b_in), .clusters_out(b_out), .n_out(b_n), .n_lost(b_lost));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int dens, k, lost;
      cluster_t exp [32];
      dens = n % 40;
      for (int i = 0; i < 32; i++) begin
        a_in[i] = cluster_t'($urandom);
        a_in[i].valid = ($urandom_range(99) < dens);
      end
      for (int i = 0; i < 12; i++) begin
        b_in[i] = cluster_t'($urandom);
        b_in[i].valid = ($urandom_range(99) < 2 * dens);
      end
      #1;
      // 32 -> 6
      k = 0; lost = 0;
      for (int i = 0; i < 32; i++)
        if (a_in[i].valid) begin
          if (k < 6) exp[k++] = a_in[i]; else lost++;
        end
      if (lost > 0) overflows++;
      checks++;
      if (int'(a_n) != k || int'(a_lost) != lost) begin
        failures++;
        $display("FAIL 32->6 counts n=%0d lost=%0d expected %0d %0d", a_n, a_lost, k, lost);
      end
      for (int i = 0; i < 6; i++) begin
        checks++;
        if ((i < k && a_out[i] !== exp[i]) || (i >= k && a_out[i].valid)) begin
          failures++;
          $display("FAIL 32->6 out %0d got %p", i, a_out[i]);
        end
      end
      // 12 -> 4
      k = 0; lost = 0;
      for (int i = 0; i < 12; i++)
        if (b_in[i].valid) begin
          if (k < 4) exp[k++] = b_in[i]; else lost++;
        end
      checks++;
      if (int'(b_n) != k || int'(b_lost) != lost) begin
        failures++;
        $display("FAIL 12->4 counts");
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if ((i < k && b_out[i] !== exp[i]) || (i >= k && b_out[i].valid)) begin
          failures++;
          $display("FAIL 12->4 out %0d got %p", i, b_out[i]);
        end
      end
    end
    checks++;
    if (overflows == 0) begin
      failures++;
      $display("FAIL bus overflow never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
