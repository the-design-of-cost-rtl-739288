// lap_pf_arbiter: prefetch priority arbiter.
//
// Several prefetch engines may want to issue in the same cycle, but the
// cache takes one prefetch per cycle. The published design has the state machine
// maintain prefetch priorities by confidence; here the requesting PE with the
// highest confidence state wins and ties go to the lowest index (this
// design's choice). The winner's address is offered on a valid/ready port;
// the grant to the PE is raised only when the cache accepts (pf_ready).
//
// Purely combinational. pf_addr is stable while pf_valid is high and
// pf_ready low, because the PEs only change their request on a grant or on a
// load of their own stream.
module lap_pf_arbiter
  import lap_pkg::*;
#(
  parameter int unsigned NUM_PE = 8,
  parameter int unsigned ADDR_W = 44
) (
  input  logic [NUM_PE-1:0] req,
  input  pe_state_e         pe_state [NUM_PE],
  input  logic [ADDR_W-1:0] req_addr [NUM_PE],
  input  logic              pf_ready,
  output logic              pf_valid,
  output logic [ADDR_W-1:0] pf_addr,
  output logic [NUM_PE-1:0] grant,
  output logic              conflict          // more than one request
);
  pe_state_e best_state;
  int unsigned nreq;
  logic [$clog2(NUM_PE > 1 ? NUM_PE : 2)-1:0] best;

  always_comb begin
    best       = 0;
    best_state = PE_OFF;
    pf_valid   = 1'b0;
    nreq       = 0;
    for (int i = 0; i < NUM_PE; i++) begin
      if (req[i]) begin
        nreq++;
        if (!pf_valid || pe_state[i] > best_state) begin
          best       = $bits(best)'(i);
          best_state = pe_state[i];
          pf_valid   = 1'b1;
        end
      end
    end
    pf_addr  = req_addr[best];
    conflict = (nreq > 1);
    grant    = '0;
    grant[best] = pf_valid && pf_ready;
  end

endmodule
