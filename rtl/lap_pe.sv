// lap_pe: one prefetch engine (PE) of the LAP prefetcher.
//
// A PE follows one load stream, identified by its Stream_ID tag. It keeps
// four stores named in the published LAP design: the program address (last known access
// of the stream), the program stride (last observed distance between
// misses), the prefetch stride and the prefetch address (next address to
// prefetch). Its confidence state machine is
//   OFF -> SP (allocation, program stride preset to one cache line)
//   inactive NQD/SP/SPD: on a miss of the stream, current stride =
//     miss address - program address. Stride hit: prefetch stride <= program
//     stride, prefetch address <= miss address + stride, SP/NQD -> SPD,
//     SPD -> LC1. Stride miss: program stride <= current stride, -> SP.
//     Either way the program address takes the miss address.
//   active LC1/HC1/HC2/HC4/HC6: the PE runs ahead of the program by up to
//     1/1/2/4/6 prefetches. Every cache hit of the stream moves the program
//     address (sliding the window); a hit inside the prefetched moving window
//     (lap_pmw) also raises confidence one step.
//     An on-stride miss (a prefetch was late or dropped) lowers confidence
//     one step but keeps the PE active; an off-stride miss sends it back to
//     SP with the new stride.
// What comes from the published LAP design: the stores, the stride hit/miss rule, the
// initial stride of one line, the ordered states and their prefetch counts,
// the PMW feedback and that a miss does not kill an active stream. This
// design's own choices: the exact transitions between states (they are
// not spelled out in the published description), one confidence step per PMW hit or
// on-stride miss, restarting the run-ahead from the missing address, and
// counting "outstanding" prefetches as prefetches issued ahead of the
// program (one is retired per PMW hit).
//
// Interface: alloc (with alloc_id, acc_addr) claims the PE; acc_sel marks a
// load of this PE's stream with acc_miss telling a cache miss from a hit;
// mark_nqd comes from the allocation filter; pf_req/pf_addr are offered to
// the arbiter and pf_grant advances the run-ahead. All updates take effect at
// the next rising clock edge; pf_req and pf_addr are register outputs.
// Reset is asynchronous, active low, and returns the PE to OFF.
module lap_pe
  import lap_pkg::*;
#(
  parameter int unsigned ADDR_W     = 44,
  parameter int unsigned ID_W       = 8,
  parameter int unsigned LINE_BYTES = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // allocation filter
  input  logic              alloc,
  input  logic [ID_W-1:0]   alloc_id,
  input  logic              mark_nqd,
  // load of this PE's stream
  input  logic              acc_sel,
  input  logic              acc_miss,
  input  logic [ADDR_W-1:0] acc_addr,
  // prefetch request
  output logic              pf_req,
  output logic [ADDR_W-1:0] pf_addr,
  input  logic              pf_grant,
  // status
  output pe_state_e         state,
  output logic [ID_W-1:0]   tag,
  output pe_events_t        ev
);
  logic [ADDR_W-1:0]  prog_addr, prog_stride, pf_stride, last_pf;
  logic [AHEAD_W-1:0] ahead;

  logic [ADDR_W-1:0] cur_stride;
  logic              stride_hit, pmw_hit;

  assign cur_stride = acc_addr - prog_addr;
  assign stride_hit = (cur_stride == prog_stride);
  assign pf_req     = is_active(state) && (ahead < max_ahead(state));

  lap_pmw #(.ADDR_W(ADDR_W), .LINE_BYTES(LINE_BYTES)) u_pmw (
    .prog_addr (prog_addr),
    .last_pf   (last_pf),
    .stride_neg(pf_stride[ADDR_W-1]),
    .win_open  (ahead != '0),
    .addr      (acc_addr),
    .in_window (pmw_hit)
  );

  // Event flags of this cycle.
  always_comb begin
    ev = '0;
    if (!alloc && acc_sel) begin
      if (acc_miss && state inside {PE_NQD, PE_SP, PE_SPD}) begin
        ev.stride_hit  = stride_hit;
        ev.stride_miss = !stride_hit;
        ev.activate    = stride_hit && (state == PE_SPD);
      end else if (acc_miss && is_active(state)) begin
        ev.stride_hit   = stride_hit;
        ev.stride_miss  = !stride_hit;
        ev.demote       = stride_hit;
        ev.stream_break = !stride_hit;
      end else if (!acc_miss && is_active(state)) begin
        ev.pmw_hit = pmw_hit;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= PE_OFF;
      tag         <= '0;
      prog_addr   <= '0;
      prog_stride <= '0;
      pf_stride   <= '0;
      pf_addr     <= '0;
      last_pf     <= '0;
      ahead       <= '0;
    end else if (alloc) begin
      state       <= PE_SP;
      tag         <= alloc_id;
      prog_addr   <= acc_addr;
      prog_stride <= ADDR_W'(LINE_BYTES);
      ahead       <= '0;
    end else if (acc_sel && acc_miss && !is_active(state)) begin
      // stride detection (NQD, SP, SPD)
      prog_addr <= acc_addr;
      ahead     <= '0;
      if (stride_hit) begin
        pf_stride <= prog_stride;
        pf_addr   <= acc_addr + prog_stride;
        last_pf   <= acc_addr;
        state     <= (state == PE_SPD) ? PE_LC1 : PE_SPD;
      end else begin
        prog_stride <= cur_stride;
        state       <= PE_SP;
      end
    end else if (acc_sel && acc_miss) begin
      // miss of an active stream: restart the run-ahead from the miss
      prog_addr <= acc_addr;
      last_pf   <= acc_addr;
      ahead     <= '0;
      if (stride_hit) begin
        pf_addr <= acc_addr + pf_stride;
        state   <= demote(state);
      end else begin
        prog_stride <= cur_stride;
        state       <= PE_SP;
      end
    end else begin
      if (mark_nqd && !is_active(state))
        state <= PE_NQD;
      if (acc_sel && is_active(state)) begin
        prog_addr <= acc_addr;              // every hit slides the window
        if (pmw_hit) state <= promote(state);
      end
      if (pf_grant && pf_req) begin
        last_pf <= pf_addr;
        pf_addr <= pf_addr + pf_stride;
      end
      ahead <= ahead + AHEAD_W'(pf_grant && pf_req)
                     - AHEAD_W'(acc_sel && is_active(state) && pmw_hit);
    end
  end

endmodule
