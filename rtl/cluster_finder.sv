// cluster_finder: the trigger path of the chip, from strips to cluster packets.
//
// Two identical flows, one per sensor layer (strips 0..63 and 64..127), run up
// to the overlap finding:
//   mask (strip enable) -> cluster research (32 clusters) -> width cut ->
//   priority encoder (6 clusters)
// then the overlap finder keeps the clusters of both layers that coincide
// within offset/window (up to 12) and a last priority encoder keeps 4 of them.
// A non-empty result is a trigger packet written into the trigger FIFO; when
// the FIFO is full the packet is dropped and trig_lost pulses.
//
// Pipeline and timing: one register after cluster research, one after the
// first priority encoders, one after the overlap finding and one after the
// final encoder, so a packet leaves (fifo_wr) 4 clock cycles after its strips
// were presented. Each register is woken up only when the stage before it, or
// the register itself, holds a valid cluster; otherwise it keeps its value and
// is not clocked, which is how the chip saves power when the detector is quiet.
// wake[s] tells when stage register s loaded. n_lost counts the clusters
// dropped by the priority encoders in the current cycle.
// The stage order, bus sizes (32, 6, 12, 4), the wake-up and the FIFO-full
// input follow the document; the number of pipeline registers is this
// design's choice. In the output packet the clusters of layer 1 come first.
module cluster_finder
  import feafs_pkg::*;
#(
  parameter int unsigned N_PE1 = 6,   // clusters per layer after encoder 1
  parameter int unsigned N_PE2 = PKT_CLUS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_STRIPS-1:0]   strips,
  input  logic [N_STRIPS-1:0]   strip_enable,
  input  logic [WIDTH_W-1:0]    cluster_threshold,
  input  logic signed [4:0]     coinc_offset,
  input  logic [3:0]            coinc_window,
  input  logic                  fifo_full,
  output logic                  fifo_wr,
  output trig_pkt_t             pkt,
  output logic                  trig_lost,
  output logic [6:0]            n_lost,
  output logic [3:0]            wake
);

  logic [N_STRIPS-1:0] masked;
  assign masked = strips & strip_enable;

  // Stage 1: cluster research
  cluster_t [CLUS_PER_LAYER-1:0] res1, res2, s1_l1, s1_l2;

  cluster_research u_res1 (.strips(masked[0 +: LAYER_STRIPS]),            .clusters(res1));
  cluster_research u_res2 (.strips(masked[LAYER_STRIPS +: LAYER_STRIPS]), .clusters(res2));

  function automatic logic any_valid32(input cluster_t [CLUS_PER_LAYER-1:0] c);
    logic a;
    a = 1'b0;
    for (int i = 0; i < CLUS_PER_LAYER; i++) a |= c[i].valid;
    return a;
  endfunction

  logic wake1;
  assign wake1 = any_valid32(res1) | any_valid32(res2) |
                 any_valid32(s1_l1) | any_valid32(s1_l2);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1_l1 <= '0;
      s1_l2 <= '0;
    end else if (wake1) begin
      s1_l1 <= res1;
      s1_l2 <= res2;
    end

  // Stage 2: width cut and first priority encoders
  cluster_t [CLUS_PER_LAYER-1:0] cut1, cut2;
  cluster_t [N_PE1-1:0]          pe1, pe2, s2_l1, s2_l2;
  logic [$clog2(N_PE1+1)-1:0]    pe1_n, pe2_n;
  logic [$clog2(CLUS_PER_LAYER+1)-1:0] lost1, lost2;

  width_cut #(.N(CLUS_PER_LAYER)) u_cut1 (.clusters_in(s1_l1), .threshold(cluster_threshold), .clusters_out(cut1));
  width_cut #(.N(CLUS_PER_LAYER)) u_cut2 (.clusters_in(s1_l2), .threshold(cluster_threshold), .clusters_out(cut2));

  cluster_prio_enc #(.N_IN(CLUS_PER_LAYER), .N_OUT(N_PE1)) u_pe1
    (.clusters_in(cut1), .clusters_out(pe1), .n_out(pe1_n), .n_lost(lost1));
  cluster_prio_enc #(.N_IN(CLUS_PER_LAYER), .N_OUT(N_PE1)) u_pe2
    (.clusters_in(cut2), .clusters_out(pe2), .n_out(pe2_n), .n_lost(lost2));

  logic wake2;
  assign wake2 = (pe1_n != 0) | (pe2_n != 0) |
                 (|{s2_l1[0].valid, s2_l2[0].valid});

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s2_l1 <= '0;
      s2_l2 <= '0;
    end else if (wake2) begin
      s2_l1 <= pe1;
      s2_l2 <= pe2;
    end

  // Stage 3: overlap finding
  cluster_t [2*N_PE1-1:0] ovl, s3;
  logic                   s3_any, ovl_any;

  overlap_finder #(.N(N_PE1)) u_ovl
    (.layer1(s2_l1), .layer2(s2_l2), .offset(coinc_offset),
     .window(coinc_window), .kept(ovl));

  always_comb begin
    ovl_any = 1'b0;
    s3_any  = 1'b0;
    for (int i = 0; i < 2*N_PE1; i++) begin
      ovl_any |= ovl[i].valid;
      s3_any  |= s3[i].valid;
    end
  end

  logic wake3;
  assign wake3 = ovl_any | s3_any;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     s3 <= '0;
    else if (wake3) s3 <= ovl;

  // Stage 4: final priority encoder and packet
  cluster_t [N_PE2-1:0]        fin;
  logic [$clog2(N_PE2+1)-1:0]  fin_n;
  logic [$clog2(2*N_PE1+1)-1:0] lost3;

  cluster_prio_enc #(.N_IN(2*N_PE1), .N_OUT(N_PE2)) u_pe3
    (.clusters_in(s3), .clusters_out(fin), .n_out(fin_n), .n_lost(lost3));

  trig_pkt_t pkt_d;
  logic      pkt_v;

  always_comb begin
    pkt_d   = '0;
    pkt_d.n = 3'(fin_n);
    for (int i = 0; i < N_PE2; i++) begin
      pkt_d.c[i].addr  = fin[i].addr;
      pkt_d.c[i].width = fin[i].width;
    end
  end

  logic wake4;
  assign wake4 = (fin_n != 0) | pkt_v;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pkt   <= '0;
      pkt_v <= 1'b0;
    end else if (wake4) begin
      pkt   <= pkt_d;
      pkt_v <= (fin_n != 0);
    end

  assign fifo_wr   = pkt_v & ~fifo_full;
  assign trig_lost = pkt_v &  fifo_full;
  assign n_lost    = 7'(lost1) + 7'(lost2) + 7'(lost3);
  assign wake      = {wake4, wake3, wake2, wake1};

endmodule
