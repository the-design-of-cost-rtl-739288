// lap_pkg: types and helper functions shared by the Load Attribute
// Prefetching (LAP) blocks.
//
// Each prefetch engine (PE) runs a confidence state machine. The state
// names and their order (NQD < SP < SPD < LC1 < HC1 < HC2 < HC4 < HC6),
// the split into inactive states (below LC1) and active states, and the
// number of outstanding prefetches allowed in an active state (the number in
// its name) follow the published LAP design. OFF is the idle state of an unallocated PE.
// The numeric encoding is this design's choice: it is ordered by confidence
// so that comparing two states compares their confidence, which the
// prefetch arbiter uses as its priority.
package lap_pkg;

  typedef enum logic [3:0] {
    PE_OFF = 4'd0,  // free, not allocated to any stream
    PE_NQD = 4'd1,  // allocated, marked for replacement by the allocation filter
    PE_SP  = 4'd2,  // stride prediction: learning the stride
    PE_SPD = 4'd3,  // stride predicted once: waiting for confirmation
    PE_LC1 = 4'd4,  // low confidence, 1 prefetch outstanding
    PE_HC1 = 4'd5,  // high confidence, 1 prefetch outstanding
    PE_HC2 = 4'd6,  // high confidence, 2 prefetches outstanding
    PE_HC4 = 4'd7,  // high confidence, 4 prefetches outstanding
    PE_HC6 = 4'd8   // high confidence, 6 prefetches outstanding
  } pe_state_e;

  // Width of the run-ahead counter: enough for the largest limit (6).
  localparam int unsigned AHEAD_W = 3;

  // One-cycle event flags, reported by the PEs and the top for monitoring.
  typedef struct packed {
    logic pe_alloc;       // a free (OFF) PE was allocated to a new stream
    logic pe_realloc;     // a PE marked NQD was re-allocated to a new stream
    logic pe_victim;      // an inactive PE was marked NQD by the allocation filter
    logic pe_alloc_drop;  // PE miss with every PE active: no allocation
    logic stride_hit;     // a miss agreed with the recorded program stride
    logic stride_miss;    // a miss disagreed with the recorded program stride
    logic activate;       // a PE entered the first active state (LC1)
    logic pmw_hit;        // a cache hit fell in a PE's prefetched moving window
    logic demote;         // an active PE saw an on-stride miss and lost confidence
    logic stream_break;   // an active PE saw an off-stride miss and fell back to SP
    logic pf_issue;       // a prefetch was handed to the cache
    logic pf_stall;       // a prefetch was offered but the cache was not ready
    logic pf_conflict;    // more than one PE requested in the same cycle
  } lap_events_t;

  // Event flags of one prefetch engine.
  typedef struct packed {
    logic stride_hit;
    logic stride_miss;
    logic activate;
    logic pmw_hit;
    logic demote;
    logic stream_break;
  } pe_events_t;

  function automatic logic is_active(pe_state_e s);
    return s >= PE_LC1;
  endfunction

  // Number of prefetches a PE may have run ahead of the program.
  function automatic logic [AHEAD_W-1:0] max_ahead(pe_state_e s);
    case (s)
      PE_LC1, PE_HC1: return AHEAD_W'(1);
      PE_HC2:         return AHEAD_W'(2);
      PE_HC4:         return AHEAD_W'(4);
      PE_HC6:         return AHEAD_W'(6);
      default:        return AHEAD_W'(0);
    endcase
  endfunction

  // One step up the active states, saturating at HC6.
  function automatic pe_state_e promote(pe_state_e s);
    case (s)
      PE_LC1:  return PE_HC1;
      PE_HC1:  return PE_HC2;
      PE_HC2:  return PE_HC4;
      PE_HC4:  return PE_HC6;
      default: return s;
    endcase
  endfunction

  // One step down the active states, never below LC1.
  function automatic pe_state_e demote(pe_state_e s);
    case (s)
      PE_HC6:  return PE_HC4;
      PE_HC4:  return PE_HC2;
      PE_HC2:  return PE_HC1;
      PE_HC1:  return PE_LC1;
      default: return s;
    endcase
  endfunction

endpackage
