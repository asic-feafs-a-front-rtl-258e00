// link_mux: frame formatter and 4-bit output multiplexer.
//
// Sends one frame at a time on data_out, most significant nibble first, one
// nibble per link clock:
//   cluster frame: nibble 1 = {2'b01, number of clusters - 1}, then for each
//                  cluster its 4-bit address and its 4-bit size
//                  (3, 5, 7 or 9 nibbles);
//   readout word:  20 bits = {1'b1, word number (3 bits), 16 strips}, strip
//                  16*w+1 in bit 15 and strip 16*w+16 in bit 0 (5 nibbles).
// A readout event (128 strips) is loaded from the readout FIFO with ro_load
// and held here while its 8 words go out, possibly with cluster frames in
// between; ro_held is set from the load to the start of word 8. ready is high
// when nothing is being sent or the last nibble of a frame is on its way out,
// so the controller can start the next frame back to back. Between frames the
// bus carries 4'b0000. data_out is registered. Frame layouts follow the
// document's output frame tables; the idle nibble and the handshake are this
// design's choices.
module link_mux
  import feafs_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  link_sel_e           sel,
  input  trig_pkt_t           trig_pkt,
  input  logic                ro_load,
  input  logic [N_STRIPS-1:0] ro_event,
  output logic [3:0]          data_out,
  output logic                ready,
  output logic                ro_held,
  output logic                frame_start   // a frame's first nibble is loaded
);

  logic [35:0]         shreg;
  logic [3:0]          cnt;     // nibbles still to send
  logic [N_STRIPS-1:0] ev;
  logic [2:0]          widx;

  assign ready       = (cnt <= 4'd1);
  assign frame_start = start && ready;

  logic [N_STRIPS-1:0] ev_src;
  assign ev_src = ro_load ? ro_event : ev;

  function automatic logic [19:0] ro_word(input logic [N_STRIPS-1:0] e,
                                          input logic [2:0] w);
    logic [15:0] s;
    for (int i = 0; i < 16; i++) s[15-i] = e[16*w + i];
    return {1'b1, w, s};
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      shreg    <= '0;
      cnt      <= '0;
      data_out <= IDLE_NIBBLE;
      ev       <= '0;
      widx     <= '0;
      ro_held  <= 1'b0;
    end else begin
      data_out <= (cnt != 0) ? shreg[35:32] : IDLE_NIBBLE;
      if (cnt != 0) begin
        shreg <= shreg << 4;
        cnt   <= cnt - 4'd1;
      end
      if (start && ready) begin
        if (sel == SEL_TRIG) begin
          shreg <= {ID_CLUSTER, 2'(trig_pkt.n - 3'd1), trig_pkt.c[0],
                    trig_pkt.c[1], trig_pkt.c[2], trig_pkt.c[3]};
          cnt   <= 4'd1 + {trig_pkt.n, 1'b0};
        end else if (sel == SEL_RO) begin
          shreg <= {ro_word(ev_src, ro_load ? 3'd0 : widx), 16'h0};
          cnt   <= 4'd5;
          if (ro_load) begin
            ev      <= ro_event;
            widx    <= 3'd1;
            ro_held <= 1'b1;
          end else begin
            widx    <= widx + 3'd1;
            ro_held <= (widx != 3'd7);
          end
        end
      end
    end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && sel == SEL_TRIG) |-> (trig_pkt.n inside {[3'd1:3'd4]}));

endmodule
