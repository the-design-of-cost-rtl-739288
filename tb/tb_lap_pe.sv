// tb_lap_pe: self-checking test of one prefetch engine.
//
// Part 1 walks an engine through its life cycle with directed loads and
// checks every state, prefetch address and the cycle at which the first
// prefetch request appears: allocation to SP, a stride miss, two stride hits
// to SPD and LC1, run-ahead limited to the state's count, PMW hits raising
// confidence up to HC6 with 6 prefetches ahead, a hit outside the window
// being ignored, an on-stride miss lowering confidence, an off-stride miss
// falling back to SP, and marking as NQD.
// Part 2 drives random loads, grants and allocations and compares the
// engine every cycle with a behavioural model kept in the testbench.
module tb_lap_pe;
  import lap_pkg::*;
  localparam int unsigned ADDR_W = 44, ID_W = 8, LINE = 64;

  logic              clk = 0, rst_n = 0;
  logic              alloc = 0, mark_nqd = 0, acc_sel = 0, acc_miss = 0, pf_grant = 0;
  logic [ID_W-1:0]   alloc_id = '0;
  logic [ADDR_W-1:0] acc_addr = '0;
  logic              pf_req;
  logic [ADDR_W-1:0] pf_addr;
  pe_state_e         state;
  logic [ID_W-1:0]   tag;
  pe_events_t        ev;
  int checks = 0, failures = 0;

  lap_pe #(.ADDR_W(ADDR_W), .ID_W(ID_W), .LINE_BYTES(LINE)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: state=%s pf_req=%b pf_addr=%h", what, $time, state.name(), pf_req, pf_addr);
    end
  endtask

  // one load (or idle cycle) applied at the next rising edge
  task automatic load(logic sel, logic miss, logic [ADDR_W-1:0] a, logic grant = 0);
    acc_sel = sel; acc_miss = miss; acc_addr = a; pf_grant = grant;
    @(posedge clk); #1;
    acc_sel = 0; acc_miss = 0; pf_grant = 0; alloc = 0; mark_nqd = 0;
  endtask

  task automatic grant_one(logic [ADDR_W-1:0] exp_addr);
    chk($sformatf("request for %h", exp_addr), pf_req && pf_addr == exp_addr);
    load(0, 0, '0, 1);
  endtask

  // ---------------- behavioural model (part 2) ----------------
  typedef struct {
    pe_state_e st;
    longint    pa, ps, fs, fa, lp;
    int        ahead;
  } model_t;
  model_t m;

  function automatic int lim(pe_state_e s);
    case (s)
      PE_LC1, PE_HC1: return 1;
      PE_HC2: return 2;
      PE_HC4: return 4;
      PE_HC6: return 6;
      default: return 0;
    endcase
  endfunction

  function automatic longint wrap(longint v);
    return v & ((64'd1 << ADDR_W) - 1);
  endfunction

  function automatic logic m_inwin(longint a);
    longint al = a / LINE, pl = m.pa / LINE, fl = m.lp / LINE;
    if (m.ahead == 0) return 0;
    if (m.fs[ADDR_W-1]) return al < pl && al >= fl;
    return al > pl && al <= fl;
  endfunction

  task automatic m_step(logic al, logic nq, logic sel, logic miss, longint a, logic gr);
    logic act = (m.st >= PE_LC1);
    logic req = act && (m.ahead < lim(m.st));
    logic sh  = (wrap(a - m.pa) == m.ps);
    if (al) begin
      m.st = PE_SP; m.pa = a; m.ps = LINE; m.ahead = 0;
    end else if (sel && miss && !act) begin
      if (sh) begin
        m.fs = m.ps; m.fa = wrap(a + m.ps); m.lp = a;
        m.st = (m.st == PE_SPD) ? PE_LC1 : PE_SPD;
      end else begin
        m.ps = wrap(a - m.pa); m.st = PE_SP;
      end
      m.pa = a; m.ahead = 0;
    end else if (sel && miss) begin
      if (sh) begin
        m.fa = wrap(a + m.fs);
        m.st = (m.st == PE_HC6) ? PE_HC4 : (m.st == PE_HC4) ? PE_HC2 :
               (m.st == PE_HC2) ? PE_HC1 : PE_LC1;
      end else begin
        m.ps = wrap(a - m.pa); m.st = PE_SP;
      end
      m.pa = a; m.lp = a; m.ahead = 0;
    end else begin
      logic hit = sel && act && m_inwin(a);
      if (nq && !act) m.st = PE_NQD;
      if (gr && req) begin m.lp = m.fa; m.fa = wrap(m.fa + m.fs); m.ahead++; end
      if (sel && act) m.pa = a;
      if (hit) begin
        m.ahead--;
        m.st = (m.st == PE_LC1) ? PE_HC1 : (m.st == PE_HC1) ? PE_HC2 :
               (m.st == PE_HC2) ? PE_HC4 : PE_HC6;
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ADDR_W-1:0] b;
    int cyc;
    b = 44'h10_0000;
    #12 rst_n = 1;
    @(posedge clk); #1;
    chk("reset to OFF", state == PE_OFF && !pf_req);

    // ---- part 1: directed life cycle, stride 256 bytes
    alloc = 1; alloc_id = 8'hA7; load(0, 1, b);
    chk("allocated to SP", state == PE_SP && tag == 8'hA7);
    load(1, 1, b + 64);                       // agrees with the initial one-line stride
    chk("initial stride is one line", state == PE_SPD);
    load(1, 1, b + 64 + 256);                 // stride miss
    chk("stride miss back to SP", state == PE_SP && !pf_req);
    b = b + 64 + 256;
    load(1, 1, b + 256);                      // stride hit
    chk("stride hit to SPD", state == PE_SPD && !pf_req);
    acc_sel = 1; acc_miss = 1; acc_addr = b + 512; #1;
    chk("activation event", ev.activate && ev.stride_hit);
    cyc = 0;
    load(1, 1, b + 512);                      // second stride hit
    chk("second stride hit to LC1", state == PE_LC1);
    chk("prefetch request the cycle after activation", pf_req && pf_addr == b + 768);
    b = b + 512;                              // program address
    grant_one(b + 256);
    chk("LC1 runs ahead by one only", !pf_req);
    load(1, 0, b + 512);                      // hit beyond the most recent prefetch
    chk("hit outside the window gives no credit", state == PE_LC1 && !pf_req);
    load(1, 0, b - 64);                       // re-read of an older line: window slides back
    chk("hit behind the window gives no credit", state == PE_LC1 && !pf_req);
    load(1, 0, b + 256);                      // hit on the prefetched line
    chk("PMW hit promotes to HC1", state == PE_HC1 && pf_req && pf_addr == b + 512);
    b = b + 256;
    grant_one(b + 256);
    load(1, 0, b + 256 + 8);
    chk("HC2", state == PE_HC2);
    b = b + 256;
    grant_one(b + 256); grant_one(b + 512);
    chk("HC2 holds two ahead", !pf_req);
    load(1, 0, b + 256);
    chk("HC4", state == PE_HC4);
    b = b + 256;
    grant_one(b + 512); grant_one(b + 768); grant_one(b + 1024);
    chk("HC4 holds four ahead", !pf_req);
    load(1, 0, b + 256);
    chk("HC6", state == PE_HC6);
    b = b + 256;
    for (int k = 4; k <= 6; k++) grant_one(b + 256 * k);
    chk("HC6 holds six ahead", !pf_req);
    load(1, 0, b + 256);
    chk("HC6 saturates", state == PE_HC6 && pf_req);
    b = b + 256;
    load(1, 1, b + 256);                      // on-stride miss: a late prefetch
    chk("on-stride miss demotes HC6 to HC4", state == PE_HC4 && pf_req && pf_addr == b + 512);
    b = b + 256;
    load(1, 1, b + 4096);                     // off-stride miss
    chk("off-stride miss falls back to SP", state == PE_SP && !pf_req);
    mark_nqd = 1; load(0, 0, '0);
    chk("marked NQD", state == PE_NQD);
    load(1, 1, b + 4096 + 4096);              // own stream returns with the same stride
    chk("NQD stream recovers to SPD", state == PE_SPD);

    // ---- part 2: random comparison against the model
    alloc = 1; alloc_id = 8'h11; acc_addr = 44'h20_0000;
    m_step(1, 0, 0, 1, 44'h20_0000, 0);
    load(0, 1, 44'h20_0000);
    for (int n = 0; n < 20000; n++) begin
      logic al, nq, sel, miss, gr;
      longint a, strd;
      strd = ($urandom_range(0, 1) ? 192 : -320);
      al   = ($urandom_range(0, 499) == 0);
      nq   = ($urandom_range(0, 99) == 0);
      sel  = ($urandom_range(0, 2) == 0);
      miss = ($urandom_range(0, 3) == 0);
      gr   = 1'($urandom);
      case ($urandom_range(0, 5))
        0: a = m.pa + $urandom_range(0, 2000) - 1000;
        1, 2: a = m.pa + m.ps;
        default: a = m.pa + strd * $urandom_range(1, 3);
      endcase
      a = wrap(a);
      alloc = al; mark_nqd = nq && !al; alloc_id = 8'h11;
      m_step(al, nq && !al, sel, miss, a, gr);
      load(sel, miss, a, gr);
      chk("model state", state == m.st);
      chk("model request", pf_req == ((m.st >= PE_LC1) && (m.ahead < lim(m.st))));
      if (m.st >= PE_LC1) chk("model prefetch address", pf_addr == m.fa);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
