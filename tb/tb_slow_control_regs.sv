// tb_slow_control_regs: reset values, write/read-back of every setting, the
// bit order of the strip enable and test data registers, the three loss
// counters (increments, saturation at 0xFFFF, clear on write) and reads of
// unused addresses.
module tb_slow_control_regs;
  import feafs_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [7:0]   reg_addr = '0, reg_wdata = '0, reg_rdata;
  logic         reg_wr = 1'b0;
  logic         test_mode;
  logic [7:0]   preamp_gain, disc_threshold;
  logic [3:0]   cluster_threshold, coinc_window;
  logic signed [4:0] coinc_offset;
  logic [127:0] strip_enable, test_data;
  logic [6:0]   cluster_lost = '0;
  logic         trig_lost = 1'b0, ro_lost = 1'b0;
  logic [15:0]  cnt_cluster_loss, cnt_trig_loss, cnt_ro_loss;
  int checks = 0, failures = 0;

  slow_control_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); reg_addr = a; reg_wdata = d; reg_wr = 1'b1;
    @(negedge clk); reg_wr = 1'b0;
  endtask

  task automatic rd_check(input logic [7:0] a, input logic [7:0] exp);
    @(negedge clk); reg_addr = a; #1;
    checks++;
    if (reg_rdata !== exp) begin
      failures++; $display("FAIL read %h = %h expected %h", a, reg_rdata, exp);
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(strip_enable == '1 && test_data == '0 && !test_mode, "reset strips/test");
    check(cluster_threshold == 4'd2 && coinc_window == 4'd1 && coinc_offset == 0, "reset cluster settings");
    rd_check(8'h03, 8'h02);
    wr(8'h00, 8'h01); rd_check(8'h00, 8'h01); check(test_mode, "test mode");
    wr(8'h01, 8'h5A); rd_check(8'h01, 8'h5A); check(preamp_gain == 8'h5A, "gain");
    wr(8'h02, 8'hC3); rd_check(8'h02, 8'hC3); check(disc_threshold == 8'hC3, "threshold");
    wr(8'h03, 8'hF4); rd_check(8'h03, 8'h04); check(cluster_threshold == 4'd4, "cluster threshold");
    wr(8'h04, 8'h1F); rd_check(8'h04, 8'h1F); check(coinc_offset == -5'sd1, "offset");
    wr(8'h05, 8'h03); rd_check(8'h05, 8'h03); check(coinc_window == 4'd3, "window");
    wr(8'h10, 8'hFE); check(strip_enable[0] == 1'b0 && strip_enable[7:1] == 7'h7F, "strip enable byte 0");
    wr(8'h1F, 8'h7F); check(strip_enable[127] == 1'b0 && strip_enable[126] == 1'b1, "strip enable byte 15");
    rd_check(8'h1F, 8'h7F);
    wr(8'h25, 8'h81); check(test_data[47:40] == 8'h81 && test_data[39:0] == '0, "test data byte 5");
    rd_check(8'h25, 8'h81);
    rd_check(8'h77, 8'h00);
    // counters
    @(negedge clk); trig_lost = 1'b1; cluster_lost = 7'd5;
    repeat (10) @(negedge clk);
    trig_lost = 1'b0; cluster_lost = 7'd0; ro_lost = 1'b1;
    repeat (3) @(negedge clk);
    ro_lost = 1'b0;
    rd_check(8'h30, 8'd50); rd_check(8'h31, 8'd0);
    rd_check(8'h32, 8'd10); rd_check(8'h34, 8'd3);
    cluster_lost = 7'd127;
    repeat (600) @(negedge clk);
    cluster_lost = 7'd0;
    rd_check(8'h30, 8'hFF); rd_check(8'h31, 8'hFF);
    wr(8'h31, 8'h00);
    rd_check(8'h30, 8'h00);
    rd_check(8'h32, 8'd10);
    wr(8'h32, 8'h00);
    rd_check(8'h32, 8'h00); rd_check(8'h34, 8'd3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
