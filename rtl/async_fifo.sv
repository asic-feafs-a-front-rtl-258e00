// async_fifo: dual-clock FIFO between the LHC clock and the link clock.
//
// A DEPTH-word memory written in the write clock domain and read in the read
// clock domain. Each side keeps a binary address pointer and a Gray-coded
// pointer one bit wider; the Gray pointer of each side crosses to the other
// through two flip-flops (sync_rptr, sync_wptr). full is computed on the write
// side against the synchronised read pointer, empty on the read side against
// the synchronised write pointer, so both flags are pessimistic and safe.
// rd_full is the read side's view of full, used by the communication
// controller. A write while full and a read while empty are ignored. The read
// data show the oldest word (first-word fall-through): read pops it.
// Reset management: one asynchronous reset, released into each domain by its
// own reset synchroniser. The structure (memory with write enable gated by
// full, pointers, double synchronisers, reset management) and the 16-word
// depth follow the document; Gray coding and fall-through reads are this
// design's choices.
module async_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 16
) (
  input  logic             arst_n,
  input  logic             wclk,
  input  logic             write,
  input  logic [WIDTH-1:0] write_data,
  output logic             full,
  input  logic             rclk,
  input  logic             read,
  output logic [WIDTH-1:0] read_data,
  output logic             empty,
  output logic             rd_full
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic wreset_n, rreset_n;
  reset_sync u_wrst (.clk(wclk), .arst_n(arst_n), .rst_n(wreset_n));
  reset_sync u_rrst (.clk(rclk), .arst_n(arst_n), .rst_n(rreset_n));

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wptr, rbin, rptr;
  logic [AW:0] rptr_s1, sync_rptr, wptr_s1, sync_wptr;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Write side
  logic wenable;
  assign wenable = write & ~full;
  assign full    = (wptr == {~sync_rptr[AW:AW-1], sync_rptr[AW-2:0]});

  always_ff @(posedge wclk)
    if (wenable) mem[wbin[AW-1:0]] <= write_data;

  always_ff @(posedge wclk or negedge wreset_n)
    if (!wreset_n) begin
      wbin <= '0;
      wptr <= '0;
    end else if (wenable) begin
      wbin <= wbin + 1'b1;
      wptr <= bin2gray(wbin + 1'b1);
    end

  always_ff @(posedge wclk or negedge wreset_n)
    if (!wreset_n) {sync_rptr, rptr_s1} <= '0;
    else           {sync_rptr, rptr_s1} <= {rptr_s1, rptr};

  // Read side
  logic renable;
  assign renable   = read & ~empty;
  assign empty     = (rptr == sync_wptr);
  assign read_data = mem[rbin[AW-1:0]];

  logic [AW:0] wbin_r;
  assign wbin_r  = gray2bin(sync_wptr);
  assign rd_full = ((wbin_r - rbin) == (AW+1)'(DEPTH));

  always_ff @(posedge rclk or negedge rreset_n)
    if (!rreset_n) begin
      rbin <= '0;
      rptr <= '0;
    end else if (renable) begin
      rbin <= rbin + 1'b1;
      rptr <= bin2gray(rbin + 1'b1);
    end

  always_ff @(posedge rclk or negedge rreset_n)
    if (!rreset_n) {sync_wptr, wptr_s1} <= '0;
    else           {sync_wptr, wptr_s1} <= {wptr_s1, wptr};

  // Neither side ever sees more than DEPTH words in the FIFO.
  assert property (@(posedge wclk) disable iff (!arst_n || !wreset_n)
                   (wbin - gray2bin(sync_rptr)) <= (AW+1)'(DEPTH));
  assert property (@(posedge rclk) disable iff (!arst_n || !rreset_n)
                   (wbin_r - rbin) <= (AW+1)'(DEPTH));

endmodule
