// lap_prefetcher: Load Attribute Prefetching (LAP) stride prefetcher.
//
// The load-store unit reports every load it executes: the PC, the base
// register field rA, the effective address and whether the L1 data cache
// missed. Instead of the full PC, the prefetcher identifies a load stream by
// a short Stream_ID made of a few PC bits and the low bits of rA
// (lap_stream_lookup). A missing load whose Stream_ID no engine holds (a PE
// miss) goes through the allocation filter (lap_alloc_filter); a load whose
// Stream_ID matches is handed to that engine (lap_pe), which learns the
// stride, gains or loses confidence and runs ahead of the program. The
// engines' prefetch requests are arbitrated by confidence (lap_pf_arbiter)
// and issued one per cycle, directly into the L1, over a valid/ready port.
//
// Defaults follow the published LAP design: 8 engines, a 44-bit PC, 4 PC bits and 4 rA
// bits in the Stream_ID. The address width (44, same as the PC) and the
// cache line size (64 bytes) are this design's assumptions.
//
// Timing: one load per cycle on ld_*; its effect on the engines is visible
// from the next cycle. pf_valid/pf_addr come from registers through the
// arbiter's multiplexer; a prefetch is taken when pf_valid and pf_ready are
// both high. ev reports what happened in the current cycle and pe_state
// shows every engine's state, for monitoring. The two assertions at the end
// use the reset only to disable themselves, which lint reports as a reset
// used both synchronously and asynchronously; no logic is clocked by it.
module lap_prefetcher
  import lap_pkg::*;
#(
  parameter int unsigned NUM_PE     = 8,
  parameter int unsigned PC_W       = 44,
  parameter int unsigned ADDR_W     = 44,
  parameter int unsigned PC_BITS    = 4,
  parameter int unsigned RA_BITS    = 4,
  parameter int unsigned LINE_BYTES = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // load reports from the load-store unit
  input  logic              ld_valid,
  input  logic [PC_W-1:0]   ld_pc,
  input  logic [4:0]        ld_ra,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic              ld_miss,
  // prefetch requests to the L1 data cache
  output logic              pf_valid,
  output logic [ADDR_W-1:0] pf_addr,
  input  logic              pf_ready,
  // monitoring
  output pe_state_e         pe_state [NUM_PE],
  output lap_events_t       ev
);
  localparam int unsigned ID_W  = PC_BITS + RA_BITS;

  logic [ID_W-1:0]   stream_id;
  logic [ID_W-1:0]   pe_tag   [NUM_PE];
  logic [NUM_PE-1:0] pe_valid, match_vec, alloc_vec, victim_vec, pf_req, grant;
  logic [ADDR_W-1:0] pe_pf_addr [NUM_PE];
  pe_events_t        pe_ev      [NUM_PE];
  logic              match, pe_miss, realloc, drop, conflict;

  always_comb
    for (int i = 0; i < NUM_PE; i++)
      pe_valid[i] = (pe_state[i] != PE_OFF);

  lap_stream_lookup #(
    .NUM_PE(NUM_PE), .PC_W(PC_W), .PC_BITS(PC_BITS), .RA_BITS(RA_BITS)
  ) u_lookup (
    .pc       (ld_pc),
    .ra       (ld_ra),
    .pe_tag   (pe_tag),
    .pe_valid (pe_valid),
    .stream_id(stream_id),
    .match    (match),
    .match_vec(match_vec)
  );

  assign pe_miss = ld_valid && ld_miss && !match;

  lap_alloc_filter #(.NUM_PE(NUM_PE)) u_alloc (
    .pe_miss   (pe_miss),
    .pe_state  (pe_state),
    .alloc_vec (alloc_vec),
    .victim_vec(victim_vec),
    .realloc   (realloc),
    .drop      (drop)
  );

  for (genvar g = 0; g < NUM_PE; g++) begin : g_pe
    lap_pe #(.ADDR_W(ADDR_W), .ID_W(ID_W), .LINE_BYTES(LINE_BYTES)) u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .alloc   (alloc_vec[g]),
      .alloc_id(stream_id),
      .mark_nqd(victim_vec[g]),
      .acc_sel (ld_valid && match_vec[g]),
      .acc_miss(ld_miss),
      .acc_addr(ld_addr),
      .pf_req  (pf_req[g]),
      .pf_addr (pe_pf_addr[g]),
      .pf_grant(grant[g]),
      .state   (pe_state[g]),
      .tag     (pe_tag[g]),
      .ev      (pe_ev[g])
    );
  end

  lap_pf_arbiter #(.NUM_PE(NUM_PE), .ADDR_W(ADDR_W)) u_arb (
    .req     (pf_req),
    .pe_state(pe_state),
    .req_addr(pe_pf_addr),
    .pf_ready(pf_ready),
    .pf_valid(pf_valid),
    .pf_addr (pf_addr),
    .grant   (grant),
    .conflict(conflict)
  );

  always_comb begin
    ev = '0;
    for (int i = 0; i < NUM_PE; i++) begin
      ev.stride_hit   |= pe_ev[i].stride_hit;
      ev.stride_miss  |= pe_ev[i].stride_miss;
      ev.activate     |= pe_ev[i].activate;
      ev.pmw_hit      |= pe_ev[i].pmw_hit;
      ev.demote       |= pe_ev[i].demote;
      ev.stream_break |= pe_ev[i].stream_break;
    end
    ev.pe_alloc      = |alloc_vec && !realloc;
    ev.pe_realloc    = realloc;
    ev.pe_victim     = |victim_vec;
    ev.pe_alloc_drop = drop;
    ev.pf_issue      = pf_valid && pf_ready;
    ev.pf_stall      = pf_valid && !pf_ready;
    ev.pf_conflict   = conflict;
  end

  // A Stream_ID is held by at most one engine.
  a_unique_tag: assert property (@(posedge clk) disable iff (!rst_n)
    ld_valid |-> $onehot0(match_vec));
  // The prefetch offered to a stalled cache does not change until taken.
  a_pf_stable: assert property (@(posedge clk) disable iff (!rst_n)
    pf_valid && !pf_ready && !ld_valid |=> pf_valid && $stable(pf_addr));

endmodule
