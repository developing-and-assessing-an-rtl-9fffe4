// encom_pkg: shared sizes and types of the En-Com (energy-compressed) SRAM
// subarray.
//
// The subarray is 16 rows by 32 columns of bit cells, read and written one
// byte per access (4:16 row decoder, 2:4 column decoder). The rows are split
// into two segments of eight rows; in each segment every column owns one
// Zero-Switch Cell, so the array holds 2 x 32 compress groups of 8 cells.
// These numbers are the design's published configuration. The access
// command encoding and the sequencer state encoding below are this design's
// own choice.
package encom_pkg;

  localparam int unsigned ROWS       = 16;  // word lines (4:16 row decoder)
  localparam int unsigned COLS       = 32;  // bit-line pairs
  localparam int unsigned BYTE_W     = 8;   // one byte per access
  localparam int unsigned GROUP_SIZE = 8;   // cells per compress group
  localparam int unsigned COL_SEL    = COLS / BYTE_W;      // 4 (2:4 decoder)
  localparam int unsigned SEGMENTS   = ROWS / GROUP_SIZE;  // 2 (top, bottom)
  localparam int unsigned ROW_AW     = $clog2(ROWS);       // 4
  localparam int unsigned COL_AW     = $clog2(COL_SEL);    // 2
  localparam int unsigned ADDR_W     = ROW_AW + COL_AW;    // 6

  // State of the access sequencer (dual write pulse generator).
  typedef enum logic [1:0] {
    SEQ_IDLE  = 2'd0,  // waiting for a request
    SEQ_READ  = 2'd1,  // word line up, bit lines sensed
    SEQ_WRITE = 2'd2,  // first write cycle: the addressed cells
    SEQ_DUAL  = 2'd3   // second write cycle: the Zero-Switch Cells
  } seq_state_e;

endpackage
