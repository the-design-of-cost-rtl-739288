// lap_pmw: Prefetched Moving Window check of one prefetch engine.
//
// The window is the range of addresses between the program's last known
// access (prog_addr) and the most recent prefetched address (last_pf). A
// cache hit inside it is taken to be a hit on a prefetched line, so the L1
// lines need no "prefetched" tag bit. That rule follows the published LAP design.
//
// This design's choices: the compare is made on cache-line addresses
// (byte address divided by LINE_BYTES); the line of the last known access is
// outside the window and the line of the most recent prefetch is inside it;
// for a negative stride the window extends downwards. The window is empty
// while the engine has no prefetch outstanding ahead of the program
// (win_open low).
//
// Purely combinational.
module lap_pmw #(
  parameter int unsigned ADDR_W     = 44,
  parameter int unsigned LINE_BYTES = 64
) (
  input  logic [ADDR_W-1:0] prog_addr,  // last known access of the stream
  input  logic [ADDR_W-1:0] last_pf,    // most recent prefetched address
  input  logic              stride_neg, // prefetch stride is negative
  input  logic              win_open,   // at least one prefetch ahead of the program
  input  logic [ADDR_W-1:0] addr,       // address of the cache hit
  output logic              in_window
);
  localparam int unsigned OFS_W = $clog2(LINE_BYTES);

  logic [ADDR_W-1:0] a_line, p_line, f_line;

  always_comb begin
    a_line = addr      >> OFS_W;
    p_line = prog_addr >> OFS_W;
    f_line = last_pf   >> OFS_W;
    if (!win_open)
      in_window = 1'b0;
    else if (!stride_neg)
      in_window = (a_line > p_line) && (a_line <= f_line);
    else
      in_window = (a_line < p_line) && (a_line >= f_line);
  end

endmodule
