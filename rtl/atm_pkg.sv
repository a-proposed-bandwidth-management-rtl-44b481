// atm_pkg: types shared by the buffer-management and traffic-monitoring blocks.
//
// Every cell that is subject to burst-level resource management carries a cell
// type.  The four basic types (loner, start, middle, end) follow the scheme's
// burst delineation; "begin" is the optional fifth type used by multi-source
// virtual circuits to count concurrently active sources.  Four types fit in two
// header bits; the fifth needs a third, so the encoding here is three bits wide.
// The numeric values of the codes are this design's own choice.
package atm_pkg;

  typedef enum logic [2:0] {
    PT_LONER  = 3'd0,   // low priority cell, passed if room, may be discarded
    PT_START  = 3'd1,   // start of burst: requests the buffer reservation
    PT_MIDDLE = 3'd2,   // middle of burst
    PT_END    = 3'd3,   // end of burst: releases the reservation
    PT_BEGIN  = 3'd4    // like start, counted: one per source per burst
  } pt_e;

  // Result of a monitoring decision on one cell.
  typedef enum logic [1:0] {
    ACT_PASS    = 2'd0,  // forward unchanged
    ACT_MARK    = 2'd1,  // forward marked as discardable (excess)
    ACT_DISCARD = 2'd2   // drop
  } act_e;

  // Width of the cell body carried through the buffer: one 53-byte ATM cell.
  localparam int unsigned CELL_BITS = 424;

endpackage
