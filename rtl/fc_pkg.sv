// fc_pkg: shared sizes and types of the JPEG 2000 FIFO Controller subsystem.
//
// The defaults follow the FIFO Controller design: six EBCOT FIFOs (FIFO[0]..FIFO[5]),
// an 18-bit CCBM address, pages of 166 CCBM locations (offsets 0..165) and a 12-bit
// logical address (LA) from the code block allocator. The byte width of the compressed
// stream, the FIFO depth and flag thresholds, the MAT depth and the field layout of the
// LA and of the control word (CW) are this design's own choices.
package fc_pkg;

  // Number of EBCOT units, and so of FIFOs and CCBM page interleave.
  localparam int unsigned N_FIFO    = 6;
  // Compressed code block byte stream.
  localparam int unsigned DATA_W    = 8;
  // CCBM: 18-bit address, pages of 166 locations.
  localparam int unsigned CCBM_AW   = 18;
  localparam int unsigned PAGE_SIZE = 166;
  // Logical address from the code block allocator.
  localparam int unsigned LA_W      = 12;
  // MAT: one record per code block of a tile.
  localparam int unsigned MAT_AW    = 12;
  // FIFO depth and flag thresholds.
  localparam int unsigned FIFO_DEPTH = 512;
  localparam int unsigned AE_LEVEL   = 64;   // almost empty when count <= AE_LEVEL
  localparam int unsigned AF_LEVEL   = 448;  // almost full  when count >= AF_LEVEL

  // Logical address: resolution number, subband number, code block number.
  // sb: 0 = LL (resolution 0 only), 1 = HL, 2 = LH, 3 = HH.
  typedef struct packed {
    logic [2:0] res;
    logic [1:0] sb;
    logic [6:0] cb;
  } la_t;

  // Control word from the master controller, all sizes as log2 of the side in samples.
  //   tile_size : side of the tile
  //   sb_size   : side of the lowest-resolution (LL) subband
  //   cb_size   : side of a code block
  typedef struct packed {
    logic [3:0] sb_size;
    logic [3:0] cb_size;
    logic [3:0] tile_size;
  } cw_t;

  // Status flags of one FIFO.
  typedef struct packed {
    logic f;    // full
    logic af;   // almost full
    logic ae;   // almost empty
    logic emp;  // empty
  } fifo_flags_t;

  // Which rule of the arbiter chose the FIFO.
  typedef enum logic [2:0] {
    ARB_NONE      = 3'd0,
    ARB_RUN_F     = 3'd1,  // EBCOT working, FIFO full
    ARB_RUN_AF    = 3'd2,  // EBCOT working, FIFO almost full
    ARB_RUN_AE    = 3'd3,  // EBCOT working, FIFO almost empty
    ARB_DONE_AE   = 3'd4,  // EBCOT finished, FIFO almost empty
    ARB_DONE_AF   = 3'd5,  // EBCOT finished, FIFO almost full
    ARB_DONE_F    = 3'd6,  // EBCOT finished, FIFO full
    ARB_DONE_REST = 3'd7   // EBCOT finished, FIFO between the thresholds
  } arb_class_e;

endpackage
