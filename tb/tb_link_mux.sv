// tb_link_mux: random sequences of cluster frames and readout words.
// A reference queue holds the nibbles the link must carry; it is built from
// the frame definitions (cluster frame: 01 + count-1, then address and size
// per cluster; readout word: 1, word number, 16 strips, strip 1 first) and
// emptied one nibble per clock, idle 0000 when empty. data_out, ready and
// ro_held are compared every cycle. Frames are offered back to back and with
// gaps; cluster frames are slipped between the words of a readout event.
module tb_link_mux;
  import feafs_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         start = 1'b0, ro_load = 1'b0;
  link_sel_e    sel = SEL_NONE;
  trig_pkt_t    trig_pkt = '0;
  logic [127:0] ro_event = '0;
  logic [3:0]   data_out;
  logic         ready, ro_held, frame_start;
  int checks = 0, failures = 0;
  int n_trig = 0, n_ro = 0, n_interleave = 0, n_events = 0;

  link_mux dut (.clk, .rst_n, .start, .sel, .trig_pkt, .ro_load, .ro_event,
                .data_out, .ready, .ro_held, .frame_start);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0]   q [$];
  logic [3:0]   exp_out = 4'h0;
  logic [127:0] ev_m;
  int           widx_m = 0;
  bit           held_m = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      exp_out <= (q.size() != 0) ? q.pop_front() : 4'h0;
      if (start && ready) begin
        if (sel == SEL_TRIG) begin
          q.push_back({2'b01, 2'(trig_pkt.n - 1)});
          for (int i = 0; i < int'(trig_pkt.n); i++) begin
            q.push_back(trig_pkt.c[i].addr);
            q.push_back(trig_pkt.c[i].width);
          end
        end else if (sel == SEL_RO) begin
          logic [19:0] w;
          if (ro_load) begin ev_m = ro_event; widx_m = 0; end
          w[19] = 1'b1;
          w[18:16] = 3'(widx_m);
          for (int s = 0; s < 16; s++) w[15 - s] = ev_m[16*widx_m + s];
          for (int k = 4; k >= 0; k--) q.push_back(w[4*k +: 4]);
          widx_m++;
          held_m = (widx_m < 8);
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      checks++;
      if (data_out !== exp_out || ready !== (q.size() <= 1) || ro_held !== held_m) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: out=%h exp=%h ready=%0d q=%0d held=%0d/%0d",
                   n, data_out, exp_out, ready, q.size(), ro_held, held_m);
      end
      start = 1'b0; sel = SEL_NONE; ro_load = 1'b0;
      if (ready && $urandom_range(3) != 0) begin
        if ($urandom_range(1) == 0) begin
          trig_pkt = trig_pkt_t'({$urandom, $urandom});
          trig_pkt.n = 3'($urandom_range(1, 4));
          start = 1'b1; sel = SEL_TRIG; n_trig++;
          if (held_m) n_interleave++;
        end else begin
          start = 1'b1; sel = SEL_RO; n_ro++;
          if (!held_m) begin
            ro_load = 1'b1; n_events++;
            ro_event = {$urandom, $urandom, $urandom, $urandom};
          end
        end
      end
    end
    $display("cluster frames=%0d readout words=%0d events=%0d interleaved=%0d",
             n_trig, n_ro, n_events, n_interleave);
    checks++;
    if (n_trig == 0 || n_events == 0 || n_interleave == 0) begin
      failures++; $display("FAIL frame types not all exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
