// tb_lap_stream_lookup: self-checking test of Stream_ID formation and the
// associative PE match. The expected Stream_ID is built from the PC bits
// counted from the most significant end (bits 38..41 of a 44-bit PC with bit
// 43 least significant) to check the bit selection independently.
module tb_lap_stream_lookup;
  localparam int unsigned NUM_PE = 8, PC_W = 44, PC_BITS = 4, RA_BITS = 4;
  localparam int unsigned ID_W = PC_BITS + RA_BITS;

  logic [PC_W-1:0]   pc;
  logic [4:0]        ra;
  logic [ID_W-1:0]   pe_tag [NUM_PE];
  logic [NUM_PE-1:0] pe_valid, match_vec;
  logic [ID_W-1:0]   stream_id;
  logic              match;
  int checks = 0, failures = 0;

  lap_stream_lookup #(.NUM_PE(NUM_PE), .PC_W(PC_W), .PC_BITS(PC_BITS), .RA_BITS(RA_BITS)) dut (.*);

  function automatic logic [ID_W-1:0] ref_id(logic [PC_W-1:0] p, logic [4:0] r);
    logic [PC_BITS-1:0] pcb;
    // paper bit k (MSB-first numbering) is p[PC_W-1-k]; take bits 38..41
    for (int k = 0; k < PC_BITS; k++)
      pcb[PC_BITS-1-k] = p[PC_W-1-(PC_W-2-PC_BITS+k)];
    return {r[RA_BITS-1:0], pcb};
  endfunction

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
    // directed: pc = 0x...3C -> PC[5:2] = 4'hF, ra = 5'h15 -> low 4 bits 4'h5
    pc = 44'h123_4567_893C; ra = 5'h15;
    pe_valid = '0;
    foreach (pe_tag[i]) pe_tag[i] = '0;
    #1 chk("directed id", stream_id == 8'h5F);
    chk("no valid PE, no match", !match && match_vec == '0);
    pe_tag[5] = 8'h5F; #1 chk("invalid PE does not match", !match);
    pe_valid[5] = 1'b1; #1 chk("PE5 matches", match && match_vec == 8'b0010_0000);
    for (int n = 0; n < 3000; n++) begin
      logic [ID_W-1:0] id;
      int exp_idx;
      pc = {$urandom, $urandom};
      ra = 5'($urandom);
      id = ref_id(pc, ra);
      pe_valid = 8'($urandom);
      exp_idx = -1;
      // distinct tags, the stream's ID placed at a random PE in some cases
      for (int i = 0; i < NUM_PE; i++) pe_tag[i] = id + ID_W'(i + 1);
      if ($urandom_range(0, 1)) begin
        exp_idx = $urandom_range(0, NUM_PE - 1);
        pe_tag[exp_idx] = id;
        if (!pe_valid[exp_idx]) exp_idx = -1;
      end
      #1;
      chk("random id", stream_id == id);
      chk("random match", match == (exp_idx >= 0));
      chk("random match_vec", match_vec == ((exp_idx >= 0) ? NUM_PE'(1) << exp_idx : '0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
