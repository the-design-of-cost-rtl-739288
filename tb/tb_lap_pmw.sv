// tb_lap_pmw: self-checking test of the prefetched moving window check.
// Directed cases for both stride signs and the line-granular edges, then
// random cases compared with a reference that works on line numbers.
module tb_lap_pmw;
  localparam int unsigned ADDR_W = 44;
  localparam int unsigned LINE   = 64;

  logic [ADDR_W-1:0] prog_addr, last_pf, addr;
  logic              stride_neg, win_open, in_window;
  int checks = 0, failures = 0;

  lap_pmw #(.ADDR_W(ADDR_W), .LINE_BYTES(LINE)) dut (.*);

  function automatic logic ref_win(longint unsigned p, longint unsigned f,
                                   longint unsigned a, logic neg, logic open);
    longint unsigned pl = p / LINE, fl = f / LINE, al = a / LINE;
    if (!open) return 1'b0;
    return neg ? (al < pl && al >= fl) : (al > pl && al <= fl);
  endfunction

  task automatic check(longint unsigned p, longint unsigned f, longint unsigned a,
                       logic neg, logic open, logic exp);
    prog_addr = p; last_pf = f; addr = a; stride_neg = neg; win_open = open;
    #1;
    checks++;
    if (in_window !== exp) begin
      failures++;
      $display("FAIL p=%h f=%h a=%h neg=%b open=%b got %b exp %b", p, f, a, neg, open, in_window, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // positive stride, window lines (0x1000/64, 0x1100/64]
    check(44'h1000, 44'h1100, 44'h1040, 0, 1, 1);
    check(44'h1000, 44'h1100, 44'h1100, 0, 1, 1);
    check(44'h1000, 44'h1100, 44'h113F, 0, 1, 1);  // same line as last prefetch
    check(44'h1000, 44'h1100, 44'h1140, 0, 1, 0);  // beyond the window
    check(44'h1000, 44'h1100, 44'h1020, 0, 1, 0);  // line of last access
    check(44'h1000, 44'h1100, 44'h0F00, 0, 1, 0);  // behind the program
    check(44'h1000, 44'h1100, 44'h1080, 0, 0, 0);  // window closed
    // negative stride, window [0x0E00, 0x1000)
    check(44'h1000, 44'h0E00, 44'h0F80, 1, 1, 1);
    check(44'h1000, 44'h0E00, 44'h0E00, 1, 1, 1);
    check(44'h1000, 44'h0E00, 44'h0DFF, 1, 1, 0);
    check(44'h1000, 44'h0E00, 44'h1010, 1, 1, 0);
    check(44'h1000, 44'h0E00, 44'h0F80, 0, 1, 0);  // wrong direction
    for (int i = 0; i < 2000; i++) begin
      longint unsigned p, f, a;
      logic neg, open;
      p    = 64'h10000 + $urandom_range(0, 4095);
      neg  = 1'($urandom);
      open = ($urandom_range(0, 7) != 0);
      f    = neg ? p - $urandom_range(0, 1024) : p + $urandom_range(0, 1024);
      a    = p + $urandom_range(0, 2400) - 1200;
      check(p, f, a, neg, open, ref_win(p, f, a, neg, open));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
