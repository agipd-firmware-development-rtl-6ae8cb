// agipd_pkg: constants and types shared by the AGIPD readout train path.
//
// The bunch table holds one 16-bit entry per bunch of an XFEL train: bit 15 is
// the veto flag (1 = vetoed / bad, 0 = good) and the low bits carry the ASIC
// storage-cell ID that the bunch was written to, e.g. 16'h8000 = bunch vetoed,
// cell 0; 16'h0001 = good, cell 1. 2700 bunches per train and 352 storage
// cells per ASIC are the sizes of the AGIPD / European XFEL system.
//
// The train-builder (XTDF) stream constants below are the values shown in the
// example dumps of the format: a 64-byte header that starts with the ASCII
// "XTDF" plus 0xBEEFFACE and a 32-byte trailer that ends with "XTDF" plus
// 0xDEADABCD. The stream is made of 64-bit words; within a word the first
// byte on the wire is bits [63:56].
package agipd_pkg;

  localparam int unsigned ENTRY_W   = 16;   // bunch-table entry width
  localparam int unsigned BUNCH_ID_W = 12;  // bunch ID width on the VETO line
  localparam int unsigned CELL_FIELD_W = 15; // cell field of a bunch-table entry
  localparam int unsigned VETO_BIT  = 15;

  // Cell field value meaning "this bunch got no storage cell" (all cells busy).
  localparam logic [CELL_FIELD_W-1:0] NO_CELL = '1;

  typedef logic [ENTRY_W-1:0] entry_t;

  function automatic entry_t make_entry(logic veto, logic [CELL_FIELD_W-1:0] cell_id);
    return {veto, cell_id};
  endfunction

  // Commands of the VETO line (3 start bits, then 12-bit bunch ID + 4'b0000).
  typedef enum logic [1:0] {
    VCMD_RESERVED = 2'b00,   // start bits 100, no payload
    VCMD_NOVETO   = 2'b01,   // start bits 101
    VCMD_VETO     = 2'b10,   // start bits 110
    VCMD_GOLDEN   = 2'b11    // start bits 111
  } veto_cmd_e;

  // Image sorting modes of the train builder.
  typedef enum logic [1:0] {
    SORT_SINGLE       = 2'd0,  // one image per cell, buffer = cell
    SORT_AD_INTERLEAV = 2'd1,  // A/D frames interleaved: A = 2*cell, D = 2*cell+1
    SORT_AD_SEPARATE  = 2'd2   // all A then all D: A = cell, D = cell + NUM_CELLS
  } sort_mode_e;

  // XTDF header / trailer words.
  localparam logic [63:0] MAGIC_BEGIN    = 64'h5854_4446_beef_face;
  localparam logic [63:0] MAGIC_END      = 64'h5854_4446_dead_abcd;
  localparam logic [31:0] FORMAT_MAJOR   = 32'd1;
  localparam logic [31:0] FORMAT_MINOR   = 32'd0;

  // Sections of a train in stream order.
  typedef enum logic [3:0] {
    SEC_HEADER, SEC_IMAGES, SEC_CELL, SEC_PULSE, SEC_STATUS, SEC_LENGTH,
    SEC_DETSPEC, SEC_TRAILER
  } section_e;

endpackage
