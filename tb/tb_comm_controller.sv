// tb_comm_controller: every combination of FIFO flags, "event held" and
// "multiplexer ready" is applied; after one clock (the mode is registered)
// the mode, busy, trigger off, the selected source and the FIFO read strobes
// are compared with the mode table:
//   normal/survival: trigger first, then readout; derated: trigger only;
//   busy: readout only.
module tb_comm_controller;
  import feafs_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       trig_empty, trig_full, ro_empty, ro_full, mux_ready, ro_held;
  comm_mode_e mode;
  logic       start, trig_rd, ro_rd, busy, trigger_off;
  link_sel_e  sel;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  comm_controller dut (.clk, .rst_n, .trig_empty, .trig_full, .ro_empty, .ro_full,
    .mux_ready, .ro_held, .mode, .start, .sel, .trig_rd, .ro_rd, .busy, .trigger_off);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {trig_empty, trig_full, ro_empty, ro_full, mux_ready, ro_held} = 6'b101000;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++)
    for (int v = 0; v < 64; v++) begin
      int exp_sel, exp_mode;
      bit t_av, r_av;
      {trig_empty, trig_full, ro_empty, ro_full, mux_ready, ro_held} = 6'(v);
      if (trig_empty && trig_full) continue;
      if (ro_empty && ro_full) continue;
      @(negedge clk);
      exp_mode = (trig_full ? 1 : 0) + (ro_full ? 2 : 0);
      t_av = !trig_empty;
      r_av = ro_held || !ro_empty;
      exp_sel = 0;
      if (mux_ready) begin
        if (exp_mode == 0 || exp_mode == 3) exp_sel = t_av ? 1 : (r_av ? 2 : 0);
        else if (exp_mode == 1)             exp_sel = t_av ? 1 : 0;
        else                                exp_sel = r_av ? 2 : 0;
      end
      seen[exp_mode]++;
      checks++;
      if (int'(mode) != exp_mode || busy !== (exp_mode >= 2) ||
          trigger_off !== (exp_mode == 1 || exp_mode == 3) ||
          int'(sel) != exp_sel || start !== (exp_sel != 0) ||
          trig_rd !== (exp_sel == 1) || ro_rd !== (exp_sel == 2 && !ro_held)) begin
        failures++;
        $display("FAIL flags=%06b mode=%0d sel=%0d rd=%0d%0d busy=%0d toff=%0d expected mode %0d sel %0d",
                 v, mode, sel, trig_rd, ro_rd, busy, trigger_off, exp_mode, exp_sel);
      end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (seen[m] == 0) begin failures++; $display("FAIL mode %0d never tested", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
