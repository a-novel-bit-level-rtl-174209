// gda_addr_decoder: group address decoder of a GDA unit.
//
// Maps the N-bit DA input of one bit cycle (bit n = bit q of input word n) to
// the group it belongs to and to the rotating factor that tells the barrel
// rotator how far the group's partial products must be turned. All rotations
// of one address share a group; the seed of a group is its smallest rotation,
// and the rotating factor r satisfies addr == rotl(seed, r).
//
// The mapping is a fixed table of 2^N entries, filled at elaboration from the
// helper functions of gda_pkg; it synthesizes to plain decoding logic. The
// group numbering follows increasing seed value, as the 5-point tables of the
// DFT/DHT examples do; the 7-point DCT example numbers its four groups in
// another order, which only relabels memory rows.
//
// Purely combinational: outputs follow addr in the same cycle.
module gda_addr_decoder #(
  parameter int unsigned N  = 3,                              // cyclic length
  parameter int unsigned GW = $clog2(gda_pkg::num_groups(N)), // group address width
  parameter int unsigned RW = (N > 1) ? $clog2(N) : 1         // rotating factor width
) (
  input  logic [N-1:0]  addr,   // DA input bits of this cycle
  output logic [GW-1:0] group,  // group address G_q
  output logic [RW-1:0] rot     // rotating factor R_q
);
  import gda_pkg::*;

  logic [GW-1:0] grp_lut [2**N];
  logic [RW-1:0] rot_lut [2**N];

  for (genvar a = 0; a < 2**N; a++) begin : g_lut
    assign grp_lut[a] = GW'(group_of(MAX_N'(a), N));
    assign rot_lut[a] = RW'(rot_of(MAX_N'(a), N));
  end

  assign group = grp_lut[addr];
  assign rot   = rot_lut[addr];

endmodule
