// lap_stream_lookup: Stream Identification and PE match.
//
// A load is identified by a short Stream_ID instead of its full program
// counter: the RA_BITS low bits of the base register field rA concatenated
// with PC_BITS bits of the PC, taken just above the two PC bits that are
// always zero for 4-byte instructions. With the defaults (4 + 4 bits) this is
// Stream_ID = {rA[3:0], PC[5:2]}, i.e. bits 38..41 of a 44-bit PC when bit 43
// is the least significant, as in the published LAP design. The ID is compared with the
// tag of every allocated PE (a small fully associative lookup); at most one
// PE holds a given ID. The other PC bits and rA[4] are unused on purpose:
// leaving them out of the ID is the point of the scheme.
//
// Purely combinational: Stream_ID, the match flag and the one-hot match
// vector are valid in the same cycle as the load's fields.
module lap_stream_lookup #(
  parameter int unsigned NUM_PE  = 8,
  parameter int unsigned PC_W    = 44,
  parameter int unsigned PC_BITS = 4,
  parameter int unsigned RA_BITS = 4,
  localparam int unsigned ID_W   = PC_BITS + RA_BITS
) (
  input  logic [PC_W-1:0]   pc,                // PC of the load
  input  logic [4:0]        ra,                // base register field rA
  input  logic [ID_W-1:0]   pe_tag   [NUM_PE], // Stream_ID held by each PE
  input  logic [NUM_PE-1:0] pe_valid,          // PE is allocated (not OFF)
  output logic [ID_W-1:0]   stream_id,
  output logic              match,
  output logic [NUM_PE-1:0] match_vec
);
  always_comb begin
    stream_id = {ra[RA_BITS-1:0], pc[PC_BITS+1:2]};
    match     = 1'b0;
    for (int i = 0; i < NUM_PE; i++) begin
      match_vec[i] = pe_valid[i] && (pe_tag[i] == stream_id);
      match        = match | match_vec[i];
    end
  end

endmodule
