// lap_alloc_filter: allocation filter of the prefetch engines.
//
// Called on a PE miss (a missing load whose Stream_ID no PE holds). The
// published LAP design allocates a free PE when there is one. When none is free this
// design filters replacement so that one stray miss cannot evict a stream
// that is being learned: it re-allocates a PE already marked NQD, and if
// there is none it only marks the least confident inactive PE (SP before
// SPD) as NQD. That PE's own stream can win it back with its next miss;
// otherwise the next PE miss takes it. Active PEs are never taken. Ties go
// to the lowest index.
//
// Purely combinational; alloc_vec and victim_vec are one-hot or zero.
module lap_alloc_filter
  import lap_pkg::*;
#(
  parameter int unsigned NUM_PE = 8
) (
  input  logic              pe_miss,          // allocation request this cycle
  input  pe_state_e         pe_state [NUM_PE],
  output logic [NUM_PE-1:0] alloc_vec,        // PE to allocate to the new stream
  output logic [NUM_PE-1:0] victim_vec,       // PE to mark NQD
  output logic              realloc,          // the allocated PE was NQD, not OFF
  output logic              drop              // nothing could be done
);
  logic [NUM_PE-1:0] is_off, is_nqd, is_sp, is_spd;

  function automatic logic [NUM_PE-1:0] lowest(logic [NUM_PE-1:0] v);
    return v & (~v + NUM_PE'(1));
  endfunction

  always_comb begin
    for (int i = 0; i < NUM_PE; i++) begin
      is_off[i] = (pe_state[i] == PE_OFF);
      is_nqd[i] = (pe_state[i] == PE_NQD);
      is_sp[i]  = (pe_state[i] == PE_SP);
      is_spd[i] = (pe_state[i] == PE_SPD);
    end
    alloc_vec  = '0;
    victim_vec = '0;
    realloc    = 1'b0;
    drop       = 1'b0;
    if (pe_miss) begin
      if (|is_off)
        alloc_vec = lowest(is_off);
      else if (|is_nqd) begin
        alloc_vec = lowest(is_nqd);
        realloc   = 1'b1;
      end else if (|is_sp)
        victim_vec = lowest(is_sp);
      else if (|is_spd)
        victim_vec = lowest(is_spd);
      else
        drop = 1'b1;
    end
  end

endmodule
