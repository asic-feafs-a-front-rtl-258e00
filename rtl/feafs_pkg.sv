// feafs_pkg: types and constants shared by the FEAFS front-end logic.
//
// The chip reads 128 binary strips, 64 per sensor layer. Each layer is cut into
// 16 blocks of 4 strips; a cluster is identified by the 4-bit address of the
// block it starts in and by its width in strips. The trigger packet that goes
// into the trigger FIFO holds up to 4 such clusters, and the output link is a
// 4-bit bus carrying cluster frames (identifier 01) and readout words (MSB 1).
// Field widths of the cluster record and the packet follow the output frame
// tables; the valid bit, the LUT record layout and the idle nibble are this
// design's own choices.
package feafs_pkg;

  localparam int unsigned N_STRIPS      = 128; // strips per chip
  localparam int unsigned LAYER_STRIPS  = 64;  // strips per sensor layer
  localparam int unsigned BLOCK_STRIPS  = 4;   // strips per LUT block
  localparam int unsigned N_BLOCKS      = 16;  // blocks per layer
  localparam int unsigned ADDR_W        = 4;   // block (degraded) address
  localparam int unsigned WIDTH_W       = 4;   // cluster width field
  localparam int unsigned CLUS_PER_LAYER = 2 * N_BLOCKS; // 32 after research
  localparam int unsigned PKT_CLUS      = 4;   // clusters per trigger packet

  // Cluster record used between the cluster-finding stages.
  typedef struct packed {
    logic               valid;
    logic [ADDR_W-1:0]  addr;   // block address of the first strip
    logic [WIDTH_W-1:0] width;  // width in strips, saturates at 15
  } cluster_t;

  // One cluster found by a LUT inside its own 4-strip block.
  typedef struct packed {
    logic       valid;
    logic [1:0] start;    // first strip inside the block
    logic [2:0] len;      // strips inside the block (1..4)
    logic       at_low;   // touches strip 0 of the block
    logic       at_high;  // touches strip 3 of the block
  } lut_clus_t;

  // 16-bit LUT word: two clusters, c0 is the one on the lower strips.
  typedef struct packed {
    lut_clus_t c1;
    lut_clus_t c0;
  } lut_word_t;

  typedef lut_word_t [15:0] lut_table_t;  // packed, entry i = pattern i

  // Address and size of one cluster as sent on the link.
  typedef struct packed {
    logic [ADDR_W-1:0]  addr;
    logic [WIDTH_W-1:0] width;
  } clus_field_t;

  // Entry of the trigger FIFO: number of clusters (1..4) and the clusters,
  // c[0] being cluster 1 of the frame.
  typedef struct packed {
    logic [2:0]                   n;
    clus_field_t [PKT_CLUS-1:0]   c;
  } trig_pkt_t;

  localparam int unsigned TRIG_PKT_W = $bits(trig_pkt_t); // 35

  // Output link
  localparam logic [1:0] ID_CLUSTER = 2'b01;  // cluster frame id
  localparam logic [3:0] IDLE_NIBBLE = 4'b0000;
  localparam int unsigned RO_WORDS = 8;       // 20-bit words per event
  localparam int unsigned RO_WORD_STRIPS = 16;

  // Communication modes (controller table)
  typedef enum logic [1:0] {
    MODE_NORMAL   = 2'd0,
    MODE_DERATED  = 2'd1,  // trigger FIFO full
    MODE_BUSY     = 2'd2,  // readout FIFO full
    MODE_SURVIVAL = 2'd3   // both full
  } comm_mode_e;

  typedef enum logic [1:0] {
    SEL_NONE = 2'd0,
    SEL_TRIG = 2'd1,
    SEL_RO   = 2'd2
  } link_sel_e;

endpackage
