// tb_bus_size: bus-size study of the cluster finder.
//
// The first priority encoder of each layer keeps only N_PE1 of up to 32
// clusters, so it may drop a cluster that the overlap finder would have kept
// and that would have reached the 4-cluster output. This testbench runs
// cluster finders with N_PE1 = 2, 3, 4, 6, 8 and 32 side by side on the same
// random strips and compares each packet with a behavioural model of the
// finder for that bus size. Against the 32-cluster finder (which can never
// overflow its first encoder) it counts the packets that a smaller bus
// changed. Layer 1 gets random hits at the occupancy; layer 2 gets half of
// the layer-1 hits, shifted by -3..+3 strips so that coincidences occur, plus
// its own random hits at half the occupancy, so both layers see about the
// same occupancy. The study runs at 1 % strip occupancy and then at 5 % and
// 10 %. It checks that the default bus of 6 changes at most one packet in
// 10^4 crossings at 1 % (none in practice: a layer then needs 7 separate
// narrow clusters out of about 0.6 hit strips on average), that a bus of 2
// does lose data, and that the damage falls as the bus grows. Finally it
// prints a loss curve: for occupancies of 1 % to 20 % (5000 crossings each)
// the share of output clusters that each bus size loses against the
// unlimited bus, and checks that the unlimited bus loses none and that the
// bus of 6 peaks lower than the bus of 4. Settings are the register reset
// values (cluster threshold 2, offset 0, window 1).
module tb_bus_size;
  import feafs_pkg::*;

  localparam int NB = 6;
  localparam int SIZES [NB] = '{2, 3, 4, 6, 8, 32};

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [127:0] strips = '0;
  trig_pkt_t    pkt    [NB];
  logic         wr     [NB];
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  for (genvar k = 0; k < NB; k++) begin : g_cf
    logic       tl;
    logic [6:0] nl;
    logic [3:0] wk;
    cluster_finder #(.N_PE1(SIZES[k])) u_cf (
      .clk, .rst_n, .strips, .strip_enable('1), .cluster_threshold(4'd2),
      .coinc_offset(5'sd0), .coinc_window(4'd1), .fifo_full(1'b0),
      .fifo_wr(wr[k]), .pkt(pkt[k]), .trig_lost(tl), .n_lost(nl), .wake(wk));
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int n; int addr[4]; int width[4]; int ovf; } ref_t;

  function automatic void layer_clusters(input logic [63:0] s, output int n,
                                         output int a[32], output int w[32]);
    n = 0;
    for (int i = 0; i < 64; i++)
      if (s[i] && (i == 0 || !s[i-1])) begin
        int len;
        len = 0;
        for (int j = i; j < 64 && s[j]; j++) len++;
        if (len > 15) len = 15;
        if (len <= 2) begin a[n] = i / 4; w[n] = len; n++; end
      end
  endfunction

  function automatic ref_t model(input logic [127:0] s, input int nb);
    ref_t r;
    int n1, n2, a1[32], w1[32], a2[32], w2[32], fa[64], fw[64], nf;
    layer_clusters(s[63:0], n1, a1, w1);
    layer_clusters(s[127:64], n2, a2, w2);
    r.ovf = (n1 > nb) || (n2 > nb);
    if (n1 > nb) n1 = nb;
    if (n2 > nb) n2 = nb;
    nf = 0;
    for (int i = 0; i < n1; i++) begin
      bit k; k = 0;
      for (int j = 0; j < n2; j++) begin
        int d; d = a1[i] - a2[j]; if (d < 0) d = -d; if (d <= 1) k = 1;
      end
      if (k) begin fa[nf] = a1[i]; fw[nf] = w1[i]; nf++; end
    end
    for (int j = 0; j < n2; j++) begin
      bit k; k = 0;
      for (int i = 0; i < n1; i++) begin
        int d; d = a1[i] - a2[j]; if (d < 0) d = -d; if (d <= 1) k = 1;
      end
      if (k) begin fa[nf] = a2[j]; fw[nf] = w2[j]; nf++; end
    end
    r.n = nf > 4 ? 4 : nf;
    for (int i = 0; i < 4; i++) begin
      r.addr[i]  = i < r.n ? fa[i] : 0;
      r.width[i] = i < r.n ? fw[i] : 0;
    end
    return r;
  endfunction

  function automatic bit same(input ref_t a, input ref_t b);
    bit ok;
    ok = (a.n == b.n);
    for (int i = 0; i < 4; i++) ok &= (a.addr[i] == b.addr[i]) && (a.width[i] == b.width[i]);
    return ok;
  endfunction

  logic [127:0] hist [$];
  int occ = 0;                 // per thousand
  int ovf [NB], changed [NB], pkts = 0;
  int lost [NB], out_unl = 0;     // output clusters missing against the unlimited bus

  bit verbose = 1;
  function automatic real loss_pct(input int k);
    return out_unl ? 100.0 * lost[k] / out_unl : 0.0;
  endfunction

  task automatic run(input int cycles, input int o);
    occ = o;
    ovf = '{default: 0};
    changed = '{default: 0};
    lost = '{default: 0};
    pkts = 0; out_unl = 0;
    for (int n = 0; n < cycles; n++) begin
      @(negedge clk);
      // packets of the strips applied 4 cycles ago
      if (hist.size() >= 4) begin
        ref_t e [NB];
        for (int k = 0; k < NB; k++) begin
          e[k] = model(hist[hist.size()-4], SIZES[k]);
          checks++;
          if (wr[k] !== (e[k].n != 0)) begin
            failures++; $display("FAIL N_PE1=%0d: write %0d expected n=%0d", SIZES[k], wr[k], e[k].n);
          end else if (e[k].n != 0) begin
            bit ok;
            ok = (int'(pkt[k].n) == e[k].n);
            for (int i = 0; i < 4; i++)
              ok &= (int'(pkt[k].c[i].addr) == e[k].addr[i]) && (int'(pkt[k].c[i].width) == e[k].width[i]);
            checks++;
            if (!ok) begin failures++; $display("FAIL N_PE1=%0d: packet differs from the model", SIZES[k]); end
          end
          if (e[k].ovf) ovf[k]++;
        end
        if (e[NB-1].n != 0) pkts++;
        out_unl += e[NB-1].n;
        for (int k = 0; k < NB; k++) begin
          if (!same(e[k], e[NB-1])) changed[k]++;
          if (e[k].n < e[NB-1].n) lost[k] += e[NB-1].n - e[k].n;
        end
      end
      for (int i = 0; i < 64; i++) strips[i] = ($urandom_range(999) < occ);
      begin
        int sh;
        sh = $urandom_range(0, 6) - 3;
        for (int i = 0; i < 64; i++) begin
          int j; j = i - sh;
          strips[64+i] = (j >= 0 && j < 64) ? strips[j] & 1'($urandom_range(1)) : 1'b0;
          if ($urandom_range(1999) < occ) strips[64+i] = ~strips[64+i];
        end
      end
      hist.push_back(strips);
      if (hist.size() > 6) void'(hist.pop_front());
    end
    if (verbose) begin
      $display("occupancy %0d per mille, %0d cycles, %0d packets of the unlimited bus:", o, cycles, pkts);
      for (int k = 0; k < NB; k++)
        $display("  N_PE1=%2d: cycles with encoder-1 overflow %6d, packets changed %6d, clusters lost %0.3f %%",
                 SIZES[k], ovf[k], changed[k], loss_pct(k));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(40000, 10);
    checks++;
    if (changed[3] > 4) begin failures++; $display("FAIL bus of 6 loses data at 1 %% occupancy"); end
    checks++;
    if (changed[0] == 0) begin failures++; $display("FAIL bus of 2 never loses data at 1 %%"); end
    run(20000, 50);
    run(20000, 100);
    for (int k = 1; k < NB; k++) begin
      checks++;
      if (changed[k] > changed[k-1]) begin
        failures++; $display("FAIL damage grows from bus %0d to %0d", SIZES[k-1], SIZES[k]);
      end
    end
    checks++;
    if (changed[NB-1] != 0 || changed[3] == 0) begin
      failures++; $display("FAIL at 10 %%: unlimited bus must be exact, bus of 6 must lose data");
    end
    // loss curve: output clusters lost against the unlimited bus, 1 % to 20 %
    verbose = 0;
    $display("strips hit %%   clusters lost %% for N_PE1 = 2 3 4 6 8");
    begin
      real peak4, peak6;
      peak4 = 0.0; peak6 = 0.0;
      for (int o = 10; o <= 200; o += 10) begin
        run(5000, o);
        $display("  %2d           %7.3f %7.3f %7.3f %7.3f %7.3f", o / 10,
                 loss_pct(0), loss_pct(1), loss_pct(2), loss_pct(3), loss_pct(4));
        if (loss_pct(2) > peak4) peak4 = loss_pct(2);
        if (loss_pct(3) > peak6) peak6 = loss_pct(3);
        checks++;
        if (lost[NB-1] != 0) begin failures++; $display("FAIL unlimited bus lost clusters"); end
      end
      $display("peak loss: bus of 4 %0.3f %%, bus of 6 %0.3f %%", peak4, peak6);
      checks++;
      if (!(peak6 < peak4)) begin failures++; $display("FAIL bus of 6 not better than bus of 4"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
