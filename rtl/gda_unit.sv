// gda_unit: one group distributed arithmetic unit (GDAU).
//
// Computes an N-point cyclic convolution u_k = sum_n e_((n-k) mod N) * c_n
// of N input words with N fixed coefficients, one bit plane per clock:
// address decoder -> group memory -> barrel rotator -> N accumulators.
// The caller presents bit q of every input word on addr (bit n = word n),
// most significant (sign) bit first with first = 1 in that cycle, for L
// consecutive cycles with en = 1. acc[k] then equals u_k exactly (integer
// inputs times the integer coefficients COEF). acc is valid from the clock
// edge that takes the last bit until the next word starts.
module gda_unit #(
  parameter int unsigned N  = 3,
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 32,
  parameter int          COEF [N] = '{10215, -14761, -3646}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 first,
  input  logic [N-1:0]         addr,
  output logic signed [AW-1:0] acc [N]
);
  localparam int unsigned GW = $clog2(gda_pkg::num_groups(N));
  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1;

  logic [GW-1:0]       group;
  logic [RW-1:0]       rot;
  logic signed [W-1:0] pp [N];

  gda_addr_decoder #(.N(N), .GW(GW), .RW(RW)) u_dec (
    .addr (addr),
    .group(group),
    .rot  (rot)
  );

  gda_lookup #(.N(N), .W(W), .COEF(COEF), .GW(GW), .RW(RW)) u_lookup (
    .group(group),
    .rot  (rot),
    .pp   (pp)
  );

  gda_accumulator #(.N(N), .W(W), .AW(AW)) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .first(first),
    .pp   (pp),
    .acc  (acc)
  );

endmodule
