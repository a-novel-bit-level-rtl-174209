// gda_lookup: group memory followed by the barrel rotator.
//
// Given the group address and rotating factor of one DA address, returns
// the N partial products of that address in output order: word k is the
// bit-plane contribution to output u_k. It reads the seed's row from
// gda_group_rom and turns it by the rotating factor in gda_barrel_rotator.
// Several lookups with different coefficient sets may share one address
// decoder (the 11-point designs use one decoder for a cosine and a sine
// memory). Purely combinational.
module gda_lookup #(
  parameter int unsigned N  = 3,
  parameter int unsigned W  = 16,
  parameter int          COEF [N] = '{10215, -14761, -3646},
  parameter int unsigned GW = $clog2(gda_pkg::num_groups(N)),
  parameter int unsigned RW = (N > 1) ? $clog2(N) : 1
) (
  input  logic        [GW-1:0] group,
  input  logic        [RW-1:0] rot,
  output logic signed [W-1:0]  pp [N]
);

  logic signed [W-1:0] row [N];

  gda_group_rom #(.N(N), .W(W), .COEF(COEF), .GW(GW)) u_rom (
    .group(group),
    .row  (row)
  );

  gda_barrel_rotator #(.N(N), .W(W), .RW(RW)) u_rot (
    .din (row),
    .rot (rot),
    .dout(pp)
  );

endmodule
