// tb_lap_prefetcher: end-to-end test of the LAP prefetcher at its default
// parameters (8 engines, 44-bit PC and addresses, Stream_ID = 4 rA bits +
// 4 PC bits, 64-byte lines).
//
// The testbench plays the load-store unit and the L1 data cache. The cache
// is a set of present line addresses: a demand miss brings its line in, an
// accepted prefetch brings its line in at once, and a small random fraction
// of prefetched lines is evicted again so that late/lost prefetches occur.
// The prefetch port's ready is random.
//   Phase 0: Stream_ID formation: a hit allocates nothing; loads with equal
//            rA[3:0] and PC[5:2] share an engine whatever their other bits;
//            a different PC[5:2] makes a new stream. Then a second reset.
//   Phase 1: eight strided streams (strides +256, -128, +64, +1024, +192,
//            -64, +512, +128) interleaved. Every accepted prefetch must lie
//            on one stream's stride lattice, 0 to 7 strides ahead of that
//            stream's latest load (0: it races that load); in the second
//            half of the phase at least 80% of the loads must hit, and each
//            stream must have been allocated exactly once.
//   Phase 2: a ninth stream misses while all engines are active (dropped),
//            then stream 0 changes its stride (active stream breaks).
//   Phase 3: twelve streams of random addresses compete for the engines
//            (victim marking and re-allocation).
// Every mechanism reported on the ev port is counted and must occur.
module tb_lap_prefetcher;
  import lap_pkg::*;
  localparam int unsigned NS = 8;
  localparam int unsigned LINE = 64;

  logic              clk = 0, rst_n = 0;
  logic              ld_valid = 0, ld_miss = 0, pf_ready = 0;
  logic [43:0]       ld_pc = '0, ld_addr = '0;
  logic [4:0]        ld_ra = '0;
  logic              pf_valid;
  logic [43:0]       pf_addr;
  pe_state_e         pe_state [8];
  lap_events_t       ev;

  lap_prefetcher dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit cache [longint];                      // present lines
  bit pf_line [longint];                    // lines brought in by a prefetch
  longint cur [NS];                         // last load address of each stream
  longint strd [NS];
  int     phase = 0;
  int     hits2 = 0, loads2 = 0;
  int     n_ev [13];
  int     n_hc6 = 0;
  string  ev_name [13] = '{"pe_alloc", "pe_realloc", "pe_victim", "pe_alloc_drop",
                           "stride_hit", "stride_miss", "activate", "pmw_hit", "demote",
                           "stream_break", "pf_issue", "pf_stall", "pf_conflict"};

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: count events, fill the cache with accepted prefetches and check
  // their addresses in phase 1
  always @(posedge clk) if (rst_n) begin
    logic [12:0] e;
    e = ev;
    for (int i = 0; i < 13; i++) if (e[12 - i]) n_ev[i]++;
    foreach (pe_state[i]) if (pe_state[i] == PE_HC6) n_hc6++;
    if (pf_valid && pf_ready) begin
      longint l;
      l = longint'(pf_addr) / LINE;
      if (!cache.exists(l)) pf_line[l] = 1;
      cache[l] = 1;
      if (phase == 1) begin
        bit ok;
        ok = 0;
        for (int s = 0; s < NS; s++) begin
          longint d;
          d = longint'(pf_addr) - cur[s];
          if (d % strd[s] == 0 && d / strd[s] >= 0 && d / strd[s] <= 7) ok = 1;
        end
        chk($sformatf("prefetch %h on a stream lattice", pf_addr), ok);
        if (!ok) for (int s = 0; s < NS; s++) $display("  cur[%0d]=%h st=%s", s, cur[s], pe_state[s].name());
      end
    end
  end

  always @(negedge clk) pf_ready <= ($urandom_range(0, 9) < 7);

  task automatic do_load(logic [43:0] pc, logic [4:0] ra, longint a, output bit hit);
    longint l = a / LINE;
    hit = cache.exists(l);
    ld_valid = 1; ld_pc = pc; ld_ra = ra; ld_addr = 44'(a); ld_miss = !hit;
    @(posedge clk); #1;
    ld_valid = 0;
    cache[l] = 1;
    // occasionally lose a prefetched line before it is used
    if ($urandom_range(0, 99) < 3 && pf_line.size() > 0) begin
      longint k;
      void'(pf_line.first(k));
      cache.delete(k);
      pf_line.delete(k);
    end
    if ($urandom_range(0, 1)) begin @(posedge clk); #1; end
  endtask

  function automatic logic [43:0] pc_of(int s);
    return 44'h0_8000_0000 + 44'(s * 4);    // PC[5:2] = s
  endfunction

  initial begin
    bit hit;
    strd = '{256, -128, 64, 1024, 192, -64, 512, 128};
    for (int s = 0; s < NS; s++) cur[s] = 64'h1000_0000 + s * 64'h10_0000;
    foreach (n_ev[i]) n_ev[i] = 0;
    #22 rst_n = 1;
    @(posedge clk); #1;
    foreach (pe_state[i]) chk("engines reset to OFF", pe_state[i] == PE_OFF);

    // ---- phase 0: Stream_ID formation, seen from outside
    cache[64'h5000_0000 / LINE] = 1;
    do_load(44'h0_8000_0030, 5'h01, 64'h5000_0000, hit);
    chk("a hit allocates no engine", hit && pe_state[0] == PE_OFF && n_ev[0] == 0);
    do_load(44'h0_8000_0030, 5'h01, 64'h5100_0000, hit);
    chk("a miss allocates engine 0", pe_state[0] == PE_SP && pe_state[1] == PE_OFF);
    // other upper PC bits and rA[4], same Stream_ID {rA[3:0], PC[5:2]}
    do_load(44'h1_2340_0070, 5'h11, 64'h5100_0040, hit);
    chk("same Stream_ID reaches the same engine", pe_state[0] == PE_SPD && pe_state[1] == PE_OFF);
    // PC[5:2] differs: a new stream
    do_load(44'h0_8000_0034, 5'h01, 64'h5100_0080, hit);
    chk("different PC bits make a new stream", pe_state[0] == PE_SPD && pe_state[1] == PE_SP);
    rst_n = 0; #20 rst_n = 1;
    @(posedge clk); #1;
    cache.delete(); pf_line.delete();
    foreach (n_ev[i]) n_ev[i] = 0;

    // ---- phase 1: eight strided streams
    phase = 1;
    for (int r = 0; r < 400; r++)
      for (int s = 0; s < NS; s++) begin
        cur[s] += strd[s];
        do_load(pc_of(s), 5'(s + 3), cur[s], hit);
        if (r >= 200) begin loads2++; hits2 += hit; end
      end
    $display("phase 1: %0d of %0d loads hit in the second half", hits2, loads2);
    chk("one allocation per stream", n_ev[0] == NS && n_ev[1] == 0);
    chk("strided streams mostly hit once learned", hits2 * 10 >= loads2 * 8);
    foreach (pe_state[i]) chk("all engines active after phase 1", pe_state[i] >= PE_LC1);

    // ---- phase 2: a new stream while every engine is active, then a break
    phase = 2;
    do_load(pc_of(9), 5'd20, 64'h7000_0000, hit);
    chk("new stream dropped while all engines active", n_ev[3] > 0);
    cur[0] += 5000; do_load(pc_of(0), 5'd3, cur[0], hit);
    chk("stream 0 fell back to SP", pe_state[0] == PE_SP);

    // ---- phase 3: twelve random-address streams
    phase = 3;
    for (int r = 0; r < 600; r++) begin
      int s = $urandom_range(0, 11);
      do_load(44'h0_9000_0000 + 44'(s * 4), 5'(s + 16), 64'h4000_0000 + 64'($urandom_range(0, 1 << 20)) * 64, hit);
    end

    for (int i = 0; i < 13; i++) begin
      $display("%-14s %0d", ev_name[i], n_ev[i]);
      chk($sformatf("mechanism %s happened", ev_name[i]), n_ev[i] > 0);
    end
    $display("HC6 engine-cycles %0d", n_hc6);
    chk("an engine reached HC6", n_hc6 > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
