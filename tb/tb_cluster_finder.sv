// tb_cluster_finder: the whole trigger path against a behavioural model.
//
// Random strip patterns (quiet periods, low and high occupancy, second layer a
// shifted noisy copy of the first so that coincidences happen) are applied
// every cycle, with random settings and a randomly full FIFO. The model finds
// the runs of hits on each layer, applies the strip mask and the width cut,
// keeps the first 6 per layer, keeps the clusters with a partner on the other
// layer, and keeps the first 4 (layer 1 first). The packet must come out
// exactly 4 cycles after its strips, be written only when the FIFO is not
// full, and the loss count must match. Counts how often each mechanism
// occurred (merger, cut, overflow, overlap drop, FIFO full, sleeping stage)
// and fails if one never did.
module tb_cluster_finder;
  import feafs_pkg::*;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic [N_STRIPS-1:0] strips = '0, strip_enable = '1;
  logic [3:0]          thr = 4'd2;
  logic signed [4:0]   off = 5'sd0;
  logic [3:0]          win = 4'd1;
  logic                fifo_full = 1'b0;
  logic                fifo_wr, trig_lost;
  trig_pkt_t           pkt;
  logic [6:0]          n_lost;
  logic [3:0]          wake;
  int checks = 0, failures = 0;
  int c_merge = 0, c_cut = 0, c_ovf = 0, c_full = 0, c_sleep = 0, c_pkt = 0, c_ovf4 = 0;

  cluster_finder dut (.clk, .rst_n, .strips, .strip_enable, .cluster_threshold(thr),
    .coinc_offset(off), .coinc_window(win), .fifo_full, .fifo_wr, .pkt, .trig_lost,
    .n_lost, .wake);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int n; int addr[4]; int width[4]; int lost_pe1; int lost_pe2; } ref_t;

  // clusters of one layer after mask and cut, in slot order
  function automatic void layer_clusters(input logic [63:0] s, input int t,
                                output int n, output int a[32], output int w[32]);
    n = 0;
    for (int i = 0; i < 64; i++) begin
      if (s[i] && (i == 0 || !s[i-1])) begin
        int len;
        len = 0;
        for (int j = i; j < 64 && s[j]; j++) len++;
        if ((i % 4) + len > 4) c_merge++;
        if (len > 15) len = 15;
        if (len <= t) begin
          a[n] = i / 4; w[n] = len; n++;
        end else c_cut++;
      end
    end
  endfunction

  function automatic ref_t model(input logic [127:0] s_in, input logic [127:0] en,
                                 input int t, input int o, input int wn);
    ref_t r;
    int n1, n2, a1[32], w1[32], a2[32], w2[32];
    int fa[12], fw[12], nf;
    logic [127:0] s;
    s = s_in & en;
    layer_clusters(s[63:0], t, n1, a1, w1);
    layer_clusters(s[127:64], t, n2, a2, w2);
    r.lost_pe1 = (n1 > 6 ? n1 - 6 : 0) + (n2 > 6 ? n2 - 6 : 0);
    if (n1 > 6) n1 = 6;
    if (n2 > 6) n2 = 6;
    nf = 0;
    for (int i = 0; i < n1; i++) begin
      bit k; k = 0;
      for (int j = 0; j < n2; j++) begin
        int d; d = a1[i] + o - a2[j]; if (d < 0) d = -d;
        if (d <= wn) k = 1;
      end
      if (k) begin fa[nf] = a1[i]; fw[nf] = w1[i]; nf++; end
    end
    for (int j = 0; j < n2; j++) begin
      bit k; k = 0;
      for (int i = 0; i < n1; i++) begin
        int d; d = a1[i] + o - a2[j]; if (d < 0) d = -d;
        if (d <= wn) k = 1;
      end
      if (k) begin fa[nf] = a2[j]; fw[nf] = w2[j]; nf++; end
    end
    r.lost_pe2 = nf > 4 ? nf - 4 : 0;
    r.n = nf > 4 ? 4 : nf;
    for (int i = 0; i < 4; i++) begin
      r.addr[i]  = i < r.n ? fa[i] : 0;
      r.width[i] = i < r.n ? fw[i] : 0;
    end
    return r;
  endfunction

  ref_t hist [$];
  int   cyc = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      ref_t r;
      int phase;
      @(negedge clk);
      // checks for strips applied 4 cycles ago
      if (hist.size() >= 4) begin
        ref_t e;
        e = hist[hist.size()-4];
        checks++;
        if (e.n != 0) c_pkt++;
        if (e.n != 0 && fifo_full) c_full++;
        if (fifo_wr !== (e.n != 0 && !fifo_full) || trig_lost !== (e.n != 0 && fifo_full)) begin
          failures++;
          $display("FAIL cycle %0d: wr=%0d lost=%0d expected n=%0d full=%0d", n, fifo_wr, trig_lost, e.n, fifo_full);
        end else if (e.n != 0) begin
          checks++;
          if (int'(pkt.n) != e.n) begin
            failures++; $display("FAIL cycle %0d: n=%0d expected %0d", n, pkt.n, e.n);
          end
          for (int i = 0; i < 4; i++)
            if (int'(pkt.c[i].addr) != e.addr[i] || int'(pkt.c[i].width) != e.width[i]) begin
              failures++;
              $display("FAIL cycle %0d: cluster %0d got %0d/%0d expected %0d/%0d", n, i,
                       pkt.c[i].addr, pkt.c[i].width, e.addr[i], e.width[i]);
            end
        end
        checks++;
        if (int'(n_lost) != hist[hist.size()-1].lost_pe1 + hist[hist.size()-3].lost_pe2) begin
          failures++;
          $display("FAIL cycle %0d: n_lost=%0d expected %0d", n, n_lost,
                   hist[hist.size()-1].lost_pe1 + hist[hist.size()-3].lost_pe2);
        end
        if (hist[hist.size()-1].lost_pe1 > 0) c_ovf++;
        if (hist[hist.size()-3].lost_pe2 > 0) c_ovf4++;
      end
      if (wake[0] == 1'b0) c_sleep++;
      // new stimulus
      phase = (n / 300) % 5;
      fifo_full = ($urandom_range(9) < 2);
      if (n % 300 == 299) begin
        thr = 4'($urandom_range(1, 4));
        off = 5'($signed($urandom_range(0, 2)) - 1);
        win = 4'($urandom_range(0, 2));
        strip_enable = '1;
        if (phase == 2) strip_enable[$urandom_range(127)] = 1'b0;
      end
      // settings change only while the pipeline holds no hits
      if (phase == 0 || (n % 300) >= 295) strips = '0;
      else begin
        int occ, sh;
        occ = (phase == 4) ? 15 : (phase == 3 ? 6 : 2);
        for (int i = 0; i < 64; i++) strips[i] = ($urandom_range(99) < occ);
        sh = $urandom_range(0, 8) - 4;
        for (int i = 0; i < 64; i++) begin
          int j; j = i - sh;
          strips[64+i] = (j >= 0 && j < 64) ? strips[j] : 1'b0;
          if ($urandom_range(99) < 3) strips[64+i] = ~strips[64+i];
        end
        if ($urandom_range(9) == 0) strips = '0;
      end
      r = model(strips, strip_enable, int'(thr), int'(off), int'(win));
      hist.push_back(r);
      if (hist.size() > 8) void'(hist.pop_front());
    end
    $display("merged=%0d cut=%0d overflow6=%0d overflow4=%0d full=%0d sleep=%0d packets=%0d",
             c_merge, c_cut, c_ovf, c_ovf4, c_full, c_sleep, c_pkt);
    checks++;
    if (c_merge == 0 || c_cut == 0 || c_ovf == 0 || c_ovf4 == 0 || c_full == 0 || c_sleep == 0 || c_pkt == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
