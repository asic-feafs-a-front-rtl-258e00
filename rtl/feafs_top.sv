// feafs_top: digital part of the FEAFS front-end chip for a two-layer
// ("stacked") silicon strip module.
//
// The chip receives 128 binary strips (64 per sensor layer) every LHC clock
// (40 MHz) and produces two data flows on one 4-bit output link:
//   * trigger data: clusters of narrow width found on both layers and in
//     coincidence between them (cluster_finder), 4 clock cycles after the
//     strips were sampled, sent as cluster frames;
//   * readout data: on a level-1 accept, the 128 strips of the event stored
//     in the readout pipeline, sent as 8 words of 20 bits.
// Each flow goes through its own 16-word dual-clock FIFO into the link clock
// domain (up to 100 MHz), where the communication controller chooses what the
// output multiplexer sends, in one of four modes depending on which FIFO is
// full, and raises busy / trigger off. An I2C slave gives access to the
// settings and to three loss counters.
//
// Timing: strips_in is registered once on clk_lhc (in test mode the test data
// register replaces it). The readout pipeline holds 135 columns, so an
// l1_accept selects the strips sampled 136 clk_lhc cycles before it. The
// analog front end (preamplifiers, comparators) is outside this module: its
// settings come out as preamp_gain and disc_threshold. sda_oe pulls the
// open-drain SDA line low.
// The block structure follows the document's architecture figures; the
// register map, the handshakes and the exact pipeline registers are this
// design's own.
module feafs_top
  import feafs_pkg::*;
#(
  parameter int unsigned PIPE_DEPTH = 135,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned N_PE1      = 6,
  parameter logic [6:0]  I2C_ADDR   = 7'h40
) (
  input  logic                clk_lhc,
  input  logic                clk_link,
  input  logic                arst_n,
  input  logic [N_STRIPS-1:0] strips_in,
  input  logic                l1_accept,
  input  logic                scl,
  input  logic                sda_i,
  output logic                sda_oe,
  output logic [3:0]          data_out,
  output logic                busy,
  output logic                trigger_off,
  output comm_mode_e          mode,
  output logic [7:0]          preamp_gain,
  output logic [7:0]          disc_threshold
);

  logic rst_lhc_n, rst_link_n;
  reset_sync u_rst_lhc  (.clk(clk_lhc),  .arst_n(arst_n), .rst_n(rst_lhc_n));
  reset_sync u_rst_link (.clk(clk_link), .arst_n(arst_n), .rst_n(rst_link_n));

  // Slow control
  logic [7:0]          reg_addr, reg_wdata, reg_rdata;
  logic                reg_wr;
  logic                test_mode;
  logic [WIDTH_W-1:0]  cluster_threshold;
  logic signed [4:0]   coinc_offset;
  logic [3:0]          coinc_window;
  logic [N_STRIPS-1:0] strip_enable, test_data;
  logic [6:0]          cluster_lost;
  logic                trig_lost, ro_lost;
  logic [15:0]         cnt_cluster_loss, cnt_trig_loss, cnt_ro_loss;

  i2c_slave #(.DEV_ADDR(I2C_ADDR)) u_i2c (
    .clk(clk_lhc), .rst_n(rst_lhc_n), .scl, .sda_i, .sda_oe,
    .reg_addr, .reg_wr, .reg_wdata, .reg_rdata);

  slow_control_regs u_regs (
    .clk(clk_lhc), .rst_n(rst_lhc_n), .reg_addr, .reg_wr, .reg_wdata,
    .reg_rdata, .test_mode, .preamp_gain, .disc_threshold, .cluster_threshold,
    .coinc_offset, .coinc_window, .strip_enable, .test_data, .cluster_lost,
    .trig_lost, .ro_lost, .cnt_cluster_loss, .cnt_trig_loss, .cnt_ro_loss);

  // Input register
  logic [N_STRIPS-1:0] strips_q;
  always_ff @(posedge clk_lhc or negedge rst_lhc_n)
    if (!rst_lhc_n) strips_q <= '0;
    else            strips_q <= test_mode ? test_data : strips_in;

  // Readout path
  logic [N_STRIPS-1:0] pipe_out, ro_data;
  logic                ro_full, ro_empty, ro_rd_full, ro_rd;

  readout_pipeline #(.WIDTH(N_STRIPS), .DEPTH(PIPE_DEPTH)) u_pipe (
    .clk(clk_lhc), .din(strips_q), .dout(pipe_out));

  async_fifo #(.WIDTH(N_STRIPS), .DEPTH(FIFO_DEPTH)) u_ro_fifo (
    .arst_n, .wclk(clk_lhc), .write(l1_accept), .write_data(pipe_out),
    .full(ro_full), .rclk(clk_link), .read(ro_rd), .read_data(ro_data),
    .empty(ro_empty), .rd_full(ro_rd_full));

  assign ro_lost = l1_accept & ro_full;

  // Trigger path
  logic      trig_full, trig_empty, trig_rd_full, trig_wr, trig_rd;
  trig_pkt_t trig_pkt_w, trig_pkt_r;
  logic [3:0] wake;

  cluster_finder #(.N_PE1(N_PE1)) u_cf (
    .clk(clk_lhc), .rst_n(rst_lhc_n), .strips(strips_q), .strip_enable,
    .cluster_threshold, .coinc_offset, .coinc_window, .fifo_full(trig_full),
    .fifo_wr(trig_wr), .pkt(trig_pkt_w), .trig_lost, .n_lost(cluster_lost),
    .wake);

  async_fifo #(.WIDTH(TRIG_PKT_W), .DEPTH(FIFO_DEPTH)) u_trig_fifo (
    .arst_n, .wclk(clk_lhc), .write(trig_wr), .write_data(trig_pkt_w),
    .full(trig_full), .rclk(clk_link), .read(trig_rd), .read_data(trig_pkt_r),
    .empty(trig_empty), .rd_full(trig_rd_full));

  // Link side
  logic      mux_ready, ro_held, start, frame_start;
  link_sel_e sel;

  comm_controller u_ctrl (
    .clk(clk_link), .rst_n(rst_link_n), .trig_empty, .trig_full(trig_rd_full),
    .ro_empty, .ro_full(ro_rd_full), .mux_ready, .ro_held, .mode, .start, .sel,
    .trig_rd, .ro_rd, .busy, .trigger_off);

  link_mux u_mux (
    .clk(clk_link), .rst_n(rst_link_n), .start, .sel, .trig_pkt(trig_pkt_r),
    .ro_load(ro_rd), .ro_event(ro_data), .data_out, .ready(mux_ready),
    .ro_held, .frame_start);

endmodule
