// tb_feafs_top: end-to-end test of the chip at its default sizes.
//
// Clocks: 40 MHz LHC clock, 100 MHz link clock. The chip is configured
// through I2C (cluster threshold, coincidence offset and window, one masked
// strip, test data), then driven through phases: quiet, normal traffic,
// a cluster storm that fills the trigger FIFO (derated mode), a burst of L1
// accepts that fills the readout FIFO (busy mode), both at once (survival
// mode), a test-mode event and a drain. A behavioural model computes the
// expected cluster packet of every bunch crossing and the expected event of
// every L1 accept; the 4-bit link output is decoded into cluster frames and
// readout words, events are rebuilt from their 8 words, and both are compared
// in order with the model. The three loss counters are read back through I2C
// and compared with the model's counts. Each mechanism (merger, width cut,
// both bus overflows, overlap drop, FIFO full on each side, all four modes,
// busy and trigger off, a cluster frame between readout words, sleeping
// stages, test mode) is counted and must occur at least once. The trigger
// latency (strips sampled to first nibble on the link) is measured.
module tb_feafs_top;
  import feafs_pkg::*;

  logic         clk_lhc = 1'b0, clk_link = 1'b0, arst_n = 1'b0;
  logic [127:0] strips_in = '0;
  logic         l1_accept = 1'b0;
  logic         scl = 1'b1, m_low = 1'b0, sda, sda_oe;
  logic [3:0]   data_out;
  logic         busy, trigger_off;
  comm_mode_e   mode;
  logic [7:0]   preamp_gain, disc_threshold;
  int checks = 0, failures = 0;

  assign sda = ~(m_low | sda_oe);

  feafs_top dut (.clk_lhc, .clk_link, .arst_n, .strips_in, .l1_accept, .scl,
    .sda_i(sda), .sda_oe, .data_out, .busy, .trigger_off, .mode, .preamp_gain,
    .disc_threshold);

  always #12.5 clk_lhc  = ~clk_lhc;
  always #5    clk_link = ~clk_link;

  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- I2C master
  localparam int Q = 10;  // quarter SCL period in LHC clocks
  task automatic wait_q(); repeat (Q) @(posedge clk_lhc); endtask
  task automatic i2c_start();
    m_low = 1'b0; wait_q(); scl = 1'b1; wait_q(); m_low = 1'b1; wait_q(); scl = 1'b0; wait_q();
  endtask
  task automatic i2c_stop();
    m_low = 1'b1; wait_q(); scl = 1'b1; wait_q(); m_low = 1'b0; wait_q(); wait_q();
  endtask
  task automatic write_byte(input logic [7:0] b);
    bit ack;
    for (int i = 7; i >= 0; i--) begin
      m_low = ~b[i]; wait_q(); scl = 1'b1; wait_q(); wait_q(); scl = 1'b0; wait_q();
    end
    m_low = 1'b0; wait_q(); scl = 1'b1; wait_q(); ack = ~sda; wait_q(); scl = 1'b0; wait_q();
    check(ack, "I2C acknowledge");
  endtask
  task automatic read_byte(input bit ack, output logic [7:0] b);
    m_low = 1'b0;
    for (int i = 7; i >= 0; i--) begin
      wait_q(); scl = 1'b1; wait_q(); b[i] = sda; wait_q(); scl = 1'b0; wait_q();
    end
    m_low = ack; wait_q(); scl = 1'b1; wait_q(); wait_q(); scl = 1'b0; wait_q(); m_low = 1'b0;
  endtask
  task automatic reg_write(input logic [7:0] a, input logic [7:0] d);
    i2c_start(); write_byte(8'h80); write_byte(a); write_byte(d); i2c_stop();
  endtask
  task automatic reg_read(input logic [7:0] a, output logic [7:0] d);
    i2c_start(); write_byte(8'h80); write_byte(a);
    i2c_start(); write_byte(8'h81); read_byte(1'b0, d); i2c_stop();
  endtask

  // ------------------------------------------------------------------- model
  int cfg_thr = 2, cfg_off = 0, cfg_win = 1;
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
  logic [127:0] strips_hist [$];   // effective input per LHC cycle
  pkt_ref_t     pkt_hist [$];
  pkt_ref_t     exp_trig [$];
  logic [127:0] exp_ro [$];
  int n_cyc = 0, m_cluster_loss = 0, m_trig_loss = 0, m_ro_loss = 0;
  int n_pkt = 0, n_l1 = 0, c_trig_full = 0, c_ro_full = 0, c_sleep = 0;
  bit test_mode_m = 0;
  logic [127:0] test_data_m = '0;
  int occ = 0;           // strip occupancy, per mille
  int l1_rate = 0;       // L1 probability per crossing, per mille
  bit stim_on = 0;
  bit lat_phase = 0;     // measure latency during normal traffic only

  always @(negedge clk_lhc) if (stim_on) begin
    logic [127:0] s_eff;
    pkt_ref_t r;
    // packet of the strips applied 5 cycles ago reaches the FIFO now
    if (pkt_hist.size() >= 5) begin
      r = pkt_hist[pkt_hist.size()-5];
      if (r.n != 0) begin
        n_pkt++;
        if (dut.trig_full) begin m_trig_loss++; c_trig_full++; end
        else exp_trig.push_back(r);
      end
    end
    if (!dut.u_cf.wake[0]) c_sleep++;
    // L1 accept for the strips applied 136 cycles ago
    l1_accept = 1'b0;
    if (strips_hist.size() >= 136 && $urandom_range(999) < l1_rate) begin
      l1_accept = 1'b1;
      n_l1++;
      if (dut.ro_full) begin m_ro_loss++; c_ro_full++; end
      else exp_ro.push_back(strips_hist[strips_hist.size()-136]);
    end
    // new strips
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
    if (occ == 0) strips_in = '0;
    s_eff = test_mode_m ? test_data_m : strips_in;
    strips_hist.push_back(s_eff);
    if (strips_hist.size() > 140) void'(strips_hist.pop_front());
    r = model(s_eff);
    r.t = n_cyc;
    m_cluster_loss += r.lost;
    pkt_hist.push_back(r);
    if (pkt_hist.size() > 8) void'(pkt_hist.pop_front());
    n_cyc++;
  end

  // ------------------------------------------------------------ link side
  int  st_left = 0;         // nibbles left in the current frame
  bit  st_ro = 0;
  logic [19:0] ro_word;
  logic [35:0] cl_frame;
  int  cl_n = 0, cl_len = 0;
  int  cur_widx = -1;
  logic [127:0] cur_ev;
  int  n_frames = 0, n_words = 0, n_events = 0, c_interleave = 0;
  int  mode_seen [4] = '{0, 0, 0, 0};
  int  c_busy = 0, c_toff = 0;
  int  lat_min = 1000, lat_max = 0, lat_sum = 0, lat_n = 0;

  always @(negedge clk_link) if (stim_on) begin
    mode_seen[int'(mode)]++;
    if (busy) c_busy++;
    if (trigger_off) c_toff++;
    if (st_left == 0) begin
      if (data_out[3]) begin
        st_ro = 1; st_left = 4; ro_word = {data_out, 16'h0};
      end else if (data_out[3:2] == 2'b01) begin
        st_ro = 0; cl_n = int'(data_out[1:0]) + 1; st_left = 2 * cl_n; cl_len = 0;
        cl_frame = '0;
        if (cur_widx >= 0) c_interleave++;
        if (exp_trig.size() != 0) begin
          int lat;
          lat = n_cyc - exp_trig[0].t;
          if (lat_phase && mode == MODE_NORMAL) begin
            if (lat < lat_min) lat_min = lat;
            if (lat > lat_max) lat_max = lat;
            lat_sum += lat; lat_n++;
          end
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
          n_words++;
          w = int'(ro_word[18:16]);
          check(w == cur_widx + 1 || (cur_widx == -1 && w == 0),
                $sformatf("readout word %0d after word %0d", w, cur_widx));
          for (int s = 0; s < 16; s++) cur_ev[16*w + s] = ro_word[15 - s];
          cur_widx = w;
          if (w == 7) begin
            n_events++;
            checks++;
            if (exp_ro.size() == 0 || cur_ev !== exp_ro[0]) begin
              failures++;
              $display("FAIL event %0d: got %h expected %h", n_events, cur_ev,
                       exp_ro.size() ? exp_ro[0] : 128'h0);
            end
            if (exp_ro.size() != 0) void'(exp_ro.pop_front());
            cur_widx = -1;
          end
        end
      end else begin
        cl_frame[4*cl_len +: 4] = data_out;
        cl_len++;
        if (st_left == 0) begin
          n_frames++;
          checks++;
          if (exp_trig.size() == 0) begin
            failures++; $display("FAIL unexpected cluster frame");
          end else begin
            pkt_ref_t e;
            bit ok;
            e = exp_trig.pop_front();
            ok = (e.n == cl_n);
            for (int i = 0; i < cl_n && i < 4; i++)
              ok &= (int'(cl_frame[8*i +: 4]) == e.addr[i]) && (int'(cl_frame[8*i+4 +: 4]) == e.width[i]);
            if (!ok) begin
              failures++;
              $display("FAIL cluster frame %0d: n=%0d frame=%h expected n=%0d a0=%0d w0=%0d",
                       n_frames, cl_n, cl_frame, e.n, e.addr[0], e.width[0]);
            end
          end
        end
      end
    end
  end

  // ----------------------------------------------------------------- phases
  task automatic run(input int cycles, input int o, input int l1);
    occ = o; l1_rate = l1;
    repeat (cycles) @(posedge clk_lhc);
  endtask

  initial begin
    logic [7:0] d, lo, hi;
    #100 arst_n = 1'b1;
    repeat (10) @(posedge clk_lhc);
    // configuration
    reg_write(8'h03, 8'h03); cfg_thr = 3;
    reg_write(8'h04, 8'h00); cfg_off = 0;
    reg_write(8'h05, 8'h01); cfg_win = 1;
    reg_write(8'h1A, 8'hEF); cfg_en[8*10 + 4] = 1'b0;   // mask strip 84
    reg_write(8'h01, 8'h42);
    reg_read(8'h03, d);
    check(d == 8'h03, "I2C read-back of the cluster threshold");
    check(preamp_gain == 8'h42, "preamplifier gain output");
    repeat (5) @(posedge clk_lhc);
    stim_on = 1;
    run(300, 0, 0);        // quiet: stages sleep
    lat_phase = 1;
    run(20000, 2, 3);      // normal: 2 per mille strips, L1 at 120 kHz
    lat_phase = 0;
    run(300, 0, 0);
    run(600, 120, 0);      // cluster storm: trigger FIFO full (derated)
    run(800, 0, 0);
    run(300, 10, 1000);    // L1 burst: readout FIFO full (busy)
    run(1500, 0, 0);
    run(400, 120, 1000);   // both (survival)
    run(3000, 0, 0);       // drain
    // test mode: layer-1 pattern only, so no coincidence and no packet
    test_data_m = '0; test_data_m[7:0] = 8'h66;
    reg_write(8'h20, 8'h66);
    occ = 0;
    @(negedge clk_lhc); test_mode_m = 1'b1;
    reg_write(8'h00, 8'h01);
    run(200, 0, 0);
    l1_rate = 1000; @(negedge clk_lhc); @(negedge clk_lhc); l1_rate = 0;
    run(50, 0, 0);
    reg_write(8'h00, 8'h00);
    @(negedge clk_lhc); test_mode_m = 1'b0;
    run(1000, 0, 0);
    stim_on = 0;
    repeat (20) @(posedge clk_lhc);
    // loss counters
    reg_read(8'h30, lo); reg_read(8'h31, hi);
    check({hi, lo} == 16'(m_cluster_loss), $sformatf("cluster loss counter %0d expected %0d", {hi, lo}, m_cluster_loss));
    reg_read(8'h32, lo); reg_read(8'h33, hi);
    check({hi, lo} == 16'(m_trig_loss), $sformatf("trigger loss counter %0d expected %0d", {hi, lo}, m_trig_loss));
    reg_read(8'h34, lo); reg_read(8'h35, hi);
    check({hi, lo} == 16'(m_ro_loss), $sformatf("readout loss counter %0d expected %0d", {hi, lo}, m_ro_loss));
    check(exp_trig.size() == 0, $sformatf("%0d cluster packets never sent", exp_trig.size()));
    check(exp_ro.size() == 0, $sformatf("%0d events never sent", exp_ro.size()));
    $display("packets=%0d frames=%0d trig_full_drops=%0d | L1=%0d events=%0d words=%0d ro_full_drops=%0d",
             n_pkt, n_frames, c_trig_full, n_l1, n_events, n_words, c_ro_full);
    $display("merge=%0d cut=%0d ovf6=%0d ovf4=%0d overlap_drop=%0d sleep=%0d interleave=%0d",
             c_merge, c_cut, c_ovf6, c_ovf4, c_ovl_drop, c_sleep, c_interleave);
    $display("modes normal=%0d derated=%0d busy=%0d survival=%0d | busy=%0d trigger_off=%0d",
             mode_seen[0], mode_seen[1], mode_seen[2], mode_seen[3], c_busy, c_toff);
    if (lat_n) $display("trigger latency in normal mode (LHC cycles, strips in to first nibble): min=%0d mean=%0.2f max=%0d",
                        lat_min, real'(lat_sum) / lat_n, lat_max);
    // own bound: at 100 MHz a frame waits at most for one readout word and
    // the packets queued ahead of it
    check(lat_n > 0 && lat_min >= 7 && lat_max <= 20,
          $sformatf("trigger latency %0d..%0d LHC cycles", lat_min, lat_max));
    check(c_merge > 0 && c_cut > 0 && c_ovf6 > 0 && c_ovf4 > 0 && c_ovl_drop > 0, "cluster mechanisms exercised");
    check(c_trig_full > 0 && c_ro_full > 0, "both FIFOs full at least once");
    check(mode_seen[0] > 0 && mode_seen[1] > 0 && mode_seen[2] > 0 && mode_seen[3] > 0, "all four modes");
    check(c_busy > 0 && c_toff > 0, "busy and trigger off raised");
    check(c_interleave > 0, "cluster frame between readout words");
    check(c_sleep > 0, "stages asleep on a quiet detector");
    check(n_events > 0 && n_frames > 0, "both data flows delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
