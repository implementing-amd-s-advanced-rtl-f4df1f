// asf_pkg: types and constants shared by the ASF (Advanced Synchronization
// Facility) support blocks of an out-of-order AMD64 core.
//
// The micro-op kinds are the ones the decoder produces for the ASF
// instructions: SPECULATE decodes into asf.spec followed by an ASF memory
// fence (asf.mfence), COMMIT into asf.commit, and LOCK MOV into ASF-spec loads
// and stores. The abort-reason codes written to rAX on an abort, the 64-byte
// line and the 48-bit physical address are this design's own choices.
package asf_pkg;

  localparam int unsigned PADDR_W    = 48;
  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned OFFSET_W   = $clog2(LINE_BYTES);
  localparam int unsigned LINE_AW    = PADDR_W - OFFSET_W;   // line address width
  localparam int unsigned LINE_DW    = LINE_BYTES * 8;       // line data width

  typedef logic [LINE_AW-1:0] line_addr_t;
  typedef logic [LINE_DW-1:0] line_data_t;

  // Kind of the micro-op presented at the retire stage.
  typedef enum logic [2:0] {
    UOP_OTHER      = 3'd0,
    UOP_SPEC       = 3'd1,  // asf.spec     (from SPECULATE)
    UOP_MFENCE     = 3'd2,  // asf.mfence   (from SPECULATE)
    UOP_COMMIT     = 3'd3,  // asf.commit   (from COMMIT)
    UOP_ABORT      = 3'd4,  // ABORT instruction
    UOP_ASF_MEM    = 3'd5,  // LOCK MOV load or store
    UOP_DISALLOWED = 3'd6   // instruction not allowed inside a region
  } uop_kind_e;

  // Abort reason, placed in rAX by the abort.
  typedef enum logic [2:0] {
    ABORT_NONE       = 3'd0,
    ABORT_CONTENTION = 3'd1,
    ABORT_CAPACITY   = 3'd2,
    ABORT_SOFTWARE   = 3'd3,
    ABORT_FAR        = 3'd4,  // exception or interrupt
    ABORT_DISALLOWED = 3'd5
  } abort_code_e;

endpackage
