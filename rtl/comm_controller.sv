// comm_controller: arbitration of the 4-bit output link.
//
// Works in the link clock domain. From the full flags of the two FIFOs it
// selects one of four running modes:
//   Normal   (no FIFO full)        trigger data first, then readout data
//   Derated  (trigger FIFO full)   trigger data only, readout ignored,
//                                  "trigger off" raised
//   Busy     (readout FIFO full)   readout data only, trigger ignored,
//                                  "busy" raised
//   Survival (both full)           trigger data first, then readout data,
//                                  "trigger off" and "busy" raised
// The mode is registered (one link clock after a flag changes). Whenever the
// output multiplexer reports ready (it is sending the last nibble of a frame,
// or nothing), the controller picks the next frame: a cluster frame from the
// trigger FIFO or one 20-bit readout word. A readout event is sent as 8 words
// and a cluster frame may be slipped in between any two of them. start, sel
// and the FIFO read strobes are combinational so frames follow each other
// without an idle nibble. The mode table follows the document; the
// word-by-word interleaving and the ready handshake are this design's choices.
module comm_controller
  import feafs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       trig_empty,
  input  logic       trig_full,
  input  logic       ro_empty,
  input  logic       ro_full,
  input  logic       mux_ready,   // status from the multiplexer
  input  logic       ro_held,     // an event is partly sent
  output comm_mode_e mode,
  output logic       start,
  output link_sel_e  sel,
  output logic       trig_rd,
  output logic       ro_rd,
  output logic       busy,
  output logic       trigger_off
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mode <= MODE_NORMAL;
    else        mode <= comm_mode_e'({ro_full, trig_full});

  assign busy        = (mode == MODE_BUSY)    || (mode == MODE_SURVIVAL);
  assign trigger_off = (mode == MODE_DERATED) || (mode == MODE_SURVIVAL);

  logic trig_av, ro_av;
  assign trig_av = ~trig_empty;
  assign ro_av   = ro_held | ~ro_empty;

  always_comb begin
    sel = SEL_NONE;
    if (mux_ready) begin
      unique case (mode)
        MODE_NORMAL, MODE_SURVIVAL:
          if (trig_av)    sel = SEL_TRIG;
          else if (ro_av) sel = SEL_RO;
        MODE_DERATED:
          if (trig_av)    sel = SEL_TRIG;
        MODE_BUSY:
          if (ro_av)      sel = SEL_RO;
        default: sel = SEL_NONE;
      endcase
    end
  end

  assign start   = (sel != SEL_NONE);
  assign trig_rd = (sel == SEL_TRIG);
  assign ro_rd   = (sel == SEL_RO) && !ro_held;

  assert property (@(posedge clk) disable iff (!rst_n) trig_rd |-> !trig_empty);
  assert property (@(posedge clk) disable iff (!rst_n) ro_rd |-> !ro_empty);
  assert property (@(posedge clk) disable iff (!rst_n) start |-> mux_ready);

endmodule
