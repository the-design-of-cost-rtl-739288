// tb_lap_alloc_filter: self-checking test of the allocation filter. Random
// engine states are drawn and the expected choice (lowest free engine, else
// lowest NQD engine, else mark the lowest SP engine, else the lowest SPD
// engine, else nothing) is worked out by a priority search in the testbench.
module tb_lap_alloc_filter;
  import lap_pkg::*;
  localparam int unsigned NUM_PE = 8;

  logic              pe_miss;
  pe_state_e         pe_state [NUM_PE];
  logic [NUM_PE-1:0] alloc_vec, victim_vec;
  logic              realloc, drop;
  int checks = 0, failures = 0;

  lap_alloc_filter #(.NUM_PE(NUM_PE)) dut (.*);

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int first_in(pe_state_e s);
    for (int i = 0; i < NUM_PE; i++) if (pe_state[i] == s) return i;
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int a, v;
      logic exp_re, exp_drop;
      pe_miss = ($urandom_range(0, 9) != 0);
      for (int i = 0; i < NUM_PE; i++)
        // bias towards full tables so that every branch is reached
        pe_state[i] = pe_state_e'(($urandom_range(0, 3) == 0) ? $urandom_range(0, 8)
                                                              : $urandom_range(1, 8));
      a = -1; v = -1; exp_re = 0; exp_drop = 0;
      if (pe_miss) begin
        a = first_in(PE_OFF);
        if (a < 0) begin
          a = first_in(PE_NQD);
          exp_re = (a >= 0);
        end
        if (a < 0) v = first_in(PE_SP);
        if (a < 0 && v < 0) v = first_in(PE_SPD);
        exp_drop = (a < 0 && v < 0);
      end
      #1;
      chk("alloc_vec", alloc_vec == ((a >= 0) ? NUM_PE'(1) << a : '0));
      chk("victim_vec", victim_vec == ((v >= 0) ? NUM_PE'(1) << v : '0));
      chk("realloc", realloc == exp_re);
      chk("drop", drop == exp_drop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
