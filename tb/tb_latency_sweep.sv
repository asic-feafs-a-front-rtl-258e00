// tb_latency_sweep: trigger latency of the whole chip over the operating
// points of the latency study: L1 accept rate 0, 120, 240 and 400 kHz at a
// 2 per mille strip occupancy and a 100 MHz link; link clock 40, 80, 100 and
// 120 MHz at 120 kHz; occupancy 1, 2, 3 and 5 per mille at 120 kHz and
// 100 MHz. The chip runs with its reset settings (cluster threshold 2,
// offset 0, window 1) and default parameters. Layer 2 sees the layer-1 hits
// shifted by -3..+3 strips plus independent noise, so coincidences occur.
// Every cluster frame and every readout event on the link is compared with a
// behavioural model. Per operating point the testbench checks that nothing
// is lost and that the chip stays in normal mode, prints the latency
// histogram (LHC cycles from the strips at the chip input to the first
// nibble of their cluster frame), and checks a latency bound. Across the
// points it checks the trends of the study: latency grows with the L1 rate,
// falls with the link frequency and grows with the occupancy.
module tb_latency_sweep;
  import feafs_pkg::*;

  logic         clk_lhc = 1'b0, clk_link = 1'b0, arst_n = 1'b0;
  logic [127:0] strips_in = '0;
  logic         l1_accept = 1'b0;
  logic         sda_oe;
  logic [3:0]   data_out;
  logic         busy, trigger_off;
  comm_mode_e   mode;
  logic [7:0]   preamp_gain, disc_threshold;
  int checks = 0, failures = 0;
  realtime link_half = 5ns;
  // Sanity bounds (LHC cycles): no cluster frame waits more than 1 us on a
  // link of 80 MHz or more, or 1.5 us on a 40 MHz link, at these loads.
  localparam int MAXLAT_FAST = 40;
  localparam int MAXLAT_40   = 60;

  feafs_top dut (.clk_lhc, .clk_link, .arst_n, .strips_in, .l1_accept,
    .scl(1'b1), .sda_i(1'b1), .sda_oe, .data_out, .busy, .trigger_off, .mode,
    .preamp_gain, .disc_threshold);

  always #12.5ns clk_lhc = ~clk_lhc;
  always begin #(link_half); clk_link = ~clk_link; end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------------- model
  int cfg_thr = 2, cfg_off = 0, cfg_win = 1;   // register reset values
  logic [127:0] cfg_en = '1;
  int c_merge = 0, c_cut = 0, c_ovf6 = 0, c_ovf4 = 0, c_ovl_drop = 0;

  typedef struct { int n; int addr[4]; int width[4]; int lost; int t; } pkt_ref_t;

  function automatic void layer_clusters(input logic [63:0] s, input int t,
                                         output int n, output int a[32], output int w[32]);
    n = 0;
    for (int i = 0; i < 64; i++)
      if (s[i] && (i == 0 || !s[i-1])) begin
        int len;
        len = 0;
        for (int j = i; j < 64 && s[j]; j++) len++;
        if ((i % 4) + len > 4) c_merge++;
        if (len > 15) len = 15;
        if (len <= t) begin a[n] = i / 4; w[n] = len; n++; end
        else c_cut++;
      end
  endfunction

  function automatic pkt_ref_t model(input logic [127:0] s_in);
    pkt_ref_t r;
    int n1, n2, a1[32], w1[32], a2[32], w2[32], fa[12], fw[12], nf;
    logic [127:0] s;
    s = s_in & cfg_en;
    layer_clusters(s[63:0], cfg_thr, n1, a1, w1);
    layer_clusters(s[127:64], cfg_thr, n2, a2, w2);
    r.lost = (n1 > 6 ? n1 - 6 : 0) + (n2 > 6 ? n2 - 6 : 0);
    if (r.lost > 0) c_ovf6++;
    if (n1 > 6) n1 = 6;
    if (n2 > 6) n2 = 6;
    nf = 0;
    for (int i = 0; i < n1; i++) begin
      bit k; k = 0;
      for (int j = 0; j < n2; j++) begin
        int d; d = a1[i] + cfg_off - a2[j]; if (d < 0) d = -d; if (d <= cfg_win) k = 1;
      end
      if (k) begin fa[nf] = a1[i]; fw[nf] = w1[i]; nf++; end else c_ovl_drop++;
    end
    for (int j = 0; j < n2; j++) begin
      bit k; k = 0;
      for (int i = 0; i < n1; i++) begin
        int d; d = a1[i] + cfg_off - a2[j]; if (d < 0) d = -d; if (d <= cfg_win) k = 1;
      end
      if (k) begin fa[nf] = a2[j]; fw[nf] = w2[j]; nf++; end
    end
    if (nf > 4) begin r.lost += nf - 4; c_ovf4++; end
    r.n = nf > 4 ? 4 : nf;
    for (int i = 0; i < 4; i++) begin
      r.addr[i]  = i < r.n ? fa[i] : 0;
      r.width[i] = i < r.n ? fw[i] : 0;
    end
    return r;
  endfunction

  // ------------------------------------------------------------ LHC side
  logic [127:0] strips_hist [$];
  pkt_ref_t     pkt_hist [$];
  pkt_ref_t     exp_trig [$];
  logic [127:0] exp_ro [$];
  int n_cyc = 0, n_trig_loss = 0, n_ro_loss = 0, n_clus_loss = 0, n_l1 = 0;
  int occ = 0;           // strip occupancy, per mille
  int l1_rate = 0;       // L1 probability per crossing, per ten thousand
  bit stim_on = 0;

  always @(negedge clk_lhc) if (stim_on) begin
    pkt_ref_t r;
    if (pkt_hist.size() >= 5) begin
      r = pkt_hist[pkt_hist.size()-5];
      if (r.n != 0) begin
        if (dut.trig_full) n_trig_loss++;
        else exp_trig.push_back(r);
      end
    end
    l1_accept = 1'b0;
    if (strips_hist.size() >= 136 && $urandom_range(9999) < l1_rate) begin
      l1_accept = 1'b1;
      n_l1++;
      if (dut.ro_full) n_ro_loss++;
      else exp_ro.push_back(strips_hist[strips_hist.size()-136]);
    end
    for (int i = 0; i < 64; i++) strips_in[i] = ($urandom_range(999) < occ);
    begin
      int sh;
      sh = $urandom_range(0, 6) - 3;
      for (int i = 0; i < 64; i++) begin
        int j; j = i - sh;
        strips_in[64+i] = (j >= 0 && j < 64) ? strips_in[j] : 1'b0;
        if ($urandom_range(999) < occ) strips_in[64+i] = ~strips_in[64+i];
      end
    end
    strips_hist.push_back(strips_in);
    if (strips_hist.size() > 140) void'(strips_hist.pop_front());
    r = model(strips_in);
    r.t = n_cyc;
    n_clus_loss += r.lost;
    pkt_hist.push_back(r);
    if (pkt_hist.size() > 8) void'(pkt_hist.pop_front());
    n_cyc++;
  end

  // ------------------------------------------------------------ link side
  int  st_left = 0;
  bit  st_ro = 0;
  logic [19:0] ro_word;
  logic [35:0] cl_frame;
  int  cl_n = 0, cl_len = 0;
  int  cur_widx = -1;
  logic [127:0] cur_ev;
  int  n_frames = 0, n_events = 0, n_not_normal = 0;
  int  lat_hist [32];
  int  lat_max = 0, lat_sum = 0, lat_n = 0;

  always @(negedge clk_link) if (stim_on) begin
    if (mode != MODE_NORMAL) n_not_normal++;
    if (st_left == 0) begin
      if (data_out[3]) begin
        st_ro = 1; st_left = 4; ro_word = {data_out, 16'h0};
      end else if (data_out[3:2] == 2'b01) begin
        st_ro = 0; cl_n = int'(data_out[1:0]) + 1; st_left = 2 * cl_n; cl_len = 0;
        cl_frame = '0;
        if (exp_trig.size() != 0) begin
          int lat;
          lat = n_cyc - exp_trig[0].t;
          lat_hist[lat > 31 ? 31 : lat]++;
          if (lat > lat_max) lat_max = lat;
          lat_sum += lat; lat_n++;
        end
      end else if (data_out != 4'h0) begin
        check(0, $sformatf("unknown nibble %h on an idle link", data_out));
      end
    end else begin
      st_left--;
      if (st_ro) begin
        ro_word[4*st_left +: 4] = data_out;
        if (st_left == 0) begin
          int w;
          w = int'(ro_word[18:16]);
          check(w == cur_widx + 1 || (cur_widx == -1 && w == 0),
                $sformatf("readout word %0d after word %0d", w, cur_widx));
          for (int s = 0; s < 16; s++) cur_ev[16*w + s] = ro_word[15 - s];
          cur_widx = w;
          if (w == 7) begin
            n_events++;
            check(exp_ro.size() != 0 && cur_ev === exp_ro[0], $sformatf("event %0d content", n_events));
            if (exp_ro.size() != 0) void'(exp_ro.pop_front());
            cur_widx = -1;
          end
        end
      end else begin
        cl_frame[4*cl_len +: 4] = data_out;
        cl_len++;
        if (st_left == 0) begin
          n_frames++;
          if (exp_trig.size() == 0) check(0, "unexpected cluster frame");
          else begin
            pkt_ref_t e;
            bit ok;
            e = exp_trig.pop_front();
            ok = (e.n == cl_n);
            for (int i = 0; i < cl_n && i < 4; i++)
              ok &= (int'(cl_frame[8*i +: 4]) == e.addr[i]) && (int'(cl_frame[8*i+4 +: 4]) == e.width[i]);
            check(ok, $sformatf("cluster frame %0d content", n_frames));
          end
        end
      end
    end
  end

  // ---------------------------------------------------------- operating points
  real mean_of [10];

  task automatic point(input int idx, input int f_l1_khz, input int f_out_mhz,
                       input int occ_pm, input int max_lat);
    string h;
    // L1 probability per crossing in units of 1e-4: F_L1 / 40 MHz
    l1_rate = f_l1_khz / 4;
    occ = occ_pm;
    lat_hist = '{default: 0};
    lat_max = 0; lat_sum = 0; lat_n = 0;
    n_trig_loss = 0; n_ro_loss = 0; n_clus_loss = 0; n_not_normal = 0; n_l1 = 0;
    n_frames = 0; n_events = 0;
    repeat (40000) @(posedge clk_lhc);
    occ = 0; l1_rate = 0;
    repeat (600) @(posedge clk_lhc);       // drain before the next point
    mean_of[idx] = lat_n ? real'(lat_sum) / lat_n : 0.0;
    h = "";
    for (int i = 0; i <= lat_max && i < 32; i++) h = {h, $sformatf(" %0d:%0d", i, lat_hist[i])};
    $display("Prob_strip=%0dpm F_L1=%0dkHz F_out=%0dMHz: frames=%0d L1=%0d events=%0d mean=%0.2f max=%0d |%s",
             occ_pm, f_l1_khz, f_out_mhz, n_frames, n_l1, n_events, mean_of[idx], lat_max, h);
    check(lat_n > 100, "enough cluster frames");
    check(exp_trig.size() == 0 && exp_ro.size() == 0, "all queued data delivered");
    check(n_trig_loss == 0 && n_ro_loss == 0 && n_not_normal == 0,
          $sformatf("no FIFO loss and normal mode (%0d %0d %0d)", n_trig_loss, n_ro_loss, n_not_normal));
    check(f_l1_khz == 0 || n_events == n_l1, "every L1 accept read out");
    check(lat_max <= max_lat, $sformatf("latency bound %0d > %0d", lat_max, max_lat));
  endtask

  task automatic set_link(input int f_out_mhz);
    @(posedge clk_lhc);
    link_half = 500.0ns / f_out_mhz;
  endtask

  initial begin
    #100ns arst_n = 1'b1;
    repeat (10) @(posedge clk_lhc);
    stim_on = 1;
    // L1 rate
    set_link(100);
    point(0,   0, 100, 2, MAXLAT_FAST);
    point(1, 120, 100, 2, MAXLAT_FAST);
    point(2, 240, 100, 2, MAXLAT_FAST);
    point(3, 400, 100, 2, MAXLAT_FAST);
    // link frequency
    set_link(40);
    point(4, 120,  40, 2, MAXLAT_40);
    set_link(80);
    point(5, 120,  80, 2, MAXLAT_FAST);
    set_link(120);
    point(6, 120, 120, 2, MAXLAT_FAST);
    // occupancy
    set_link(100);
    point(7, 120, 100, 1, MAXLAT_FAST);
    point(8, 120, 100, 3, MAXLAT_FAST);
    point(9, 120, 100, 5, MAXLAT_FAST);
    stim_on = 0;
    check(mean_of[3] > mean_of[0], "latency grows with the L1 rate");
    check(mean_of[4] > mean_of[5] && mean_of[5] > mean_of[6], "latency falls with the link frequency");
    check(mean_of[9] > mean_of[7], "latency grows with the occupancy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
