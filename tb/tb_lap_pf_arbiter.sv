// tb_lap_pf_arbiter: self-checking test of the confidence-priority
// prefetch arbiter. For random requests and engine states the expected
// winner is the requester with the highest state, lowest index on a tie;
// the grant must follow pf_ready.
module tb_lap_pf_arbiter;
  import lap_pkg::*;
  localparam int unsigned NUM_PE = 8, ADDR_W = 44;

  logic [NUM_PE-1:0] req, grant;
  pe_state_e         pe_state [NUM_PE];
  logic [ADDR_W-1:0] req_addr [NUM_PE];
  logic              pf_ready, pf_valid, conflict;
  logic [ADDR_W-1:0] pf_addr;
  int checks = 0, failures = 0;

  lap_pf_arbiter #(.NUM_PE(NUM_PE), .ADDR_W(ADDR_W)) dut (.*);

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int w, nr;
      req      = NUM_PE'($urandom) & NUM_PE'($urandom);
      pf_ready = 1'($urandom);
      for (int i = 0; i < NUM_PE; i++) begin
        pe_state[i] = pe_state_e'($urandom_range(4, 8));
        req_addr[i] = {12'(i), 32'($urandom)};
      end
      w = -1; nr = 0;
      for (int i = NUM_PE - 1; i >= 0; i--)
        if (req[i]) begin
          nr++;
          if (w < 0 || pe_state[i] >= pe_state[w]) w = i;
        end
      #1;
      chk("valid", pf_valid == (w >= 0));
      chk("conflict", conflict == (nr > 1));
      if (w >= 0) begin
        chk("addr", pf_addr == req_addr[w]);
        chk("grant", grant == (pf_ready ? NUM_PE'(1) << w : '0));
      end else
        chk("no grant", grant == '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
