// slow_control_regs: configuration registers and monitoring counters.
//
// An 8-bit register file addressed by the I2C pointer. Register map:
//   0x00      configuration, bit 0 = test mode (strips taken from the test
//             data registers instead of the comparators)
//   0x01      preamplifier gain (to the analog front end)
//   0x02      discriminator threshold (to the analog front end)
//   0x03      cluster threshold, bits 3:0 (maximum kept cluster width)
//   0x04      coincidence offset, bits 4:0, two's complement
//   0x05      coincidence window, bits 3:0
//   0x10-0x1F strip enable, byte i bit j enables strip 8i+j (0-based)
//   0x20-0x2F test data, same bit order
//   0x30/0x31 cluster loss counter, low/high byte
//   0x32/0x33 trigger data loss counter, low/high byte
//   0x34/0x35 readout data loss counter, low/high byte
// Counters are 16 bits, saturate, and are cleared by a write to either of
// their bytes. Other addresses read as 0. The list of settings and counters
// follows the document; addresses, widths and reset values are this design's
// choices (cluster threshold 2, i.e. clusters of fewer than 3 strips, window
// 1, all strips enabled). Reads are combinational; writes take one clock.
module slow_control_regs
  import feafs_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [7:0]          reg_addr,
  input  logic                reg_wr,
  input  logic [7:0]          reg_wdata,
  output logic [7:0]          reg_rdata,
  // settings
  output logic                test_mode,
  output logic [7:0]          preamp_gain,
  output logic [7:0]          disc_threshold,
  output logic [WIDTH_W-1:0]  cluster_threshold,
  output logic signed [4:0]   coinc_offset,
  output logic [3:0]          coinc_window,
  output logic [N_STRIPS-1:0] strip_enable,
  output logic [N_STRIPS-1:0] test_data,
  // monitoring
  input  logic [6:0]          cluster_lost,   // clusters lost this cycle
  input  logic                trig_lost,      // trigger packet dropped
  input  logic                ro_lost,        // L1 event dropped
  output logic [15:0]         cnt_cluster_loss,
  output logic [15:0]         cnt_trig_loss,
  output logic [15:0]         cnt_ro_loss
);

  logic [7:0] config_r;
  assign test_mode = config_r[0];

  function automatic logic [15:0] sat_add(input logic [15:0] c, input logic [6:0] inc);
    logic [16:0] s;
    s = {1'b0, c} + 17'(inc);
    return s[16] ? 16'hFFFF : s[15:0];
  endfunction

  logic wr_ctr0, wr_ctr1, wr_ctr2;
  assign wr_ctr0 = reg_wr && (reg_addr[7:1] == 7'h18);
  assign wr_ctr1 = reg_wr && (reg_addr[7:1] == 7'h19);
  assign wr_ctr2 = reg_wr && (reg_addr[7:1] == 7'h1A);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      config_r          <= 8'h00;
      preamp_gain       <= 8'h80;
      disc_threshold    <= 8'h80;
      cluster_threshold <= 4'd2;
      coinc_offset      <= 5'sd0;
      coinc_window      <= 4'd1;
      strip_enable      <= '1;
      test_data         <= '0;
      cnt_cluster_loss  <= '0;
      cnt_trig_loss     <= '0;
      cnt_ro_loss       <= '0;
    end else begin
      if (reg_wr) begin
        case (reg_addr) inside
          8'h00: config_r          <= reg_wdata;
          8'h01: preamp_gain       <= reg_wdata;
          8'h02: disc_threshold    <= reg_wdata;
          8'h03: cluster_threshold <= reg_wdata[3:0];
          8'h04: coinc_offset      <= reg_wdata[4:0];
          8'h05: coinc_window      <= reg_wdata[3:0];
          [8'h10:8'h1F]: strip_enable[8*reg_addr[3:0] +: 8] <= reg_wdata;
          [8'h20:8'h2F]: test_data[8*reg_addr[3:0] +: 8]    <= reg_wdata;
          default: ;
        endcase
      end
      cnt_cluster_loss <= wr_ctr0 ? '0 : sat_add(cnt_cluster_loss, cluster_lost);
      cnt_trig_loss    <= wr_ctr1 ? '0 : sat_add(cnt_trig_loss, 7'(trig_lost));
      cnt_ro_loss      <= wr_ctr2 ? '0 : sat_add(cnt_ro_loss, 7'(ro_lost));
    end

  always_comb begin
    case (reg_addr) inside
      8'h00: reg_rdata = config_r;
      8'h01: reg_rdata = preamp_gain;
      8'h02: reg_rdata = disc_threshold;
      8'h03: reg_rdata = {4'h0, cluster_threshold};
      8'h04: reg_rdata = {3'b000, coinc_offset};
      8'h05: reg_rdata = {4'h0, coinc_window};
      [8'h10:8'h1F]: reg_rdata = strip_enable[8*reg_addr[3:0] +: 8];
      [8'h20:8'h2F]: reg_rdata = test_data[8*reg_addr[3:0] +: 8];
      8'h30: reg_rdata = cnt_cluster_loss[7:0];
      8'h31: reg_rdata = cnt_cluster_loss[15:8];
      8'h32: reg_rdata = cnt_trig_loss[7:0];
      8'h33: reg_rdata = cnt_trig_loss[15:8];
      8'h34: reg_rdata = cnt_ro_loss[7:0];
      8'h35: reg_rdata = cnt_ro_loss[15:8];
      default: reg_rdata = 8'h00;
    endcase
  end

endmodule
