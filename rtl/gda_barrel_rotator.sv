// gda_barrel_rotator: logarithmic word rotator of a GDA unit.
//
// Rotates a vector of N words so that output word k is input word
// (k + rot) mod N. It is built from ceil(log2 N) stages of 2:1 multiplexers;
// stage j rotates by 2^j mod N when bit j of rot is set, so the stage wiring
// itself does the rotation and only the multiplexers cost logic. This is the
// logarithmic barrel shifter chosen for the cell-based flow; N need not be a
// power of two, since the stage amounts add up to rot modulo N for any
// rot < N.
//
// Purely combinational.
module gda_barrel_rotator #(
  parameter int unsigned N  = 3,                       // number of words
  parameter int unsigned W  = 16,                      // word width
  parameter int unsigned RW = (N > 1) ? $clog2(N) : 1  // rotate amount width
) (
  input  logic signed [W-1:0] din  [N],
  input  logic        [RW-1:0] rot,
  output logic signed [W-1:0] dout [N]
);

  always_comb begin
    logic signed [W-1:0] cur [N];
    logic signed [W-1:0] nxt [N];
    cur = din;
    for (int unsigned j = 0; j < RW; j++) begin
      for (int unsigned k = 0; k < N; k++)
        nxt[k] = rot[j] ? cur[(k + (1 << j)) % N] : cur[k];
      cur = nxt;
    end
    dout = cur;
  end

endmodule
