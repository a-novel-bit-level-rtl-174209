// p11_da: GDA processing stage of the 11-point DFT/DHT (GDAUc and GDAUs).
//
// The 10-point cyclic convolution of an 11-point transform is computed as
// two 5-point ones, one per half of the permuted input (see p11_inbuf):
//   R_k = sum_m c_m  (a + b)_((m-k) mod 5)     cosine part
//   I_k = sum_m s'_m (a - b)_((m-k) mod 5)     sine part
// with c_m = cos(2 pi 2^m / 11) and s'_m = (-1)^m sin(2 pi 2^m / 11).
// The sums and differences are never formed as words: both halves are fed
// bit-serially (MSB first, word-parallel) to one address decoder each, and
// each decoder's group address and rotating factor drive a row of the
// cosine group memory (GDAUc) and a row of the sine group memory (GDAUs),
// 8 rows of 5 words each. Per bit cycle the adders/subtractors combine the
// two halves' rotated partial products, and two banks of five accumulators
// integrate them. So there are two decoders, four group-memory reads and
// four 5-word rotators, as in the partitioned (BGDA) cost model.
//
// Timing: a block is taken on in_valid/in_ready, processed in L = IN_W bit
// cycles, and r_valid pulses one cycle after the last bit with r_re/r_im
// (scale 2^12) and the side values x0, y0. The next block may be taken in
// the last bit cycle.
module p11_da #(
  parameter int unsigned IN_W = 8,
  parameter int unsigned SW   = IN_W + 4,
  parameter int unsigned W    = 16,          // group memory word width
  parameter int unsigned AW   = W + IN_W + 1 // accumulator width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_a [5],
  input  logic signed [IN_W-1:0] in_b [5],
  input  logic signed [IN_W-1:0] in_x0,
  input  logic signed [SW-1:0]   in_y0,
  output logic                   r_valid,
  output logic signed [AW-1:0]   r_re [5],
  output logic signed [AW-1:0]   r_im [5],
  output logic signed [IN_W-1:0] r_x0,
  output logic signed [SW-1:0]   r_y0
);
  import gda_pkg::*;

  localparam int unsigned L  = IN_W;
  localparam int unsigned GW = $clog2(num_groups(5));
  localparam int unsigned RW = 3;

  logic                   busy, last, accept;
  logic [$clog2(L)-1:0]   cnt;
  logic [L-1:0]           pa [5];
  logic [L-1:0]           pb [5];
  logic signed [IN_W-1:0] x0_r;
  logic signed [SW-1:0]   y0_r;
  logic [4:0]             addr_a, addr_b;
  logic [GW-1:0]          grp_a, grp_b;
  logic [RW-1:0]          rot_a, rot_b;
  logic signed [W-1:0]    ca [5], cb [5], sa [5], sb [5];
  logic signed [W:0]      pp_re [5], pp_im [5];

  assign last     = busy && (cnt == ($clog2(L))'(L - 1));
  assign in_ready = !busy || last;
  assign accept   = in_valid && in_ready;

  for (genvar i = 0; i < 5; i++) begin : g_addr
    assign addr_a[i] = pa[i][L-1];
    assign addr_b[i] = pb[i][L-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cnt     <= '0;
      x0_r    <= '0;
      y0_r    <= '0;
      r_valid <= 1'b0;
      r_x0    <= '0;
      r_y0    <= '0;
      for (int i = 0; i < 5; i++) begin
        pa[i] <= '0;
        pb[i] <= '0;
      end
    end else begin
      r_valid <= last;
      if (last) begin
        r_x0 <= x0_r;
        r_y0 <= y0_r;
      end
      if (busy) begin
        for (int i = 0; i < 5; i++) begin
          pa[i] <= pa[i] << 1;
          pb[i] <= pb[i] << 1;
        end
        cnt <= cnt + 1'b1;
        if (last) begin
          cnt  <= '0;
          busy <= 1'b0;
        end
      end
      if (accept) begin
        busy <= 1'b1;
        cnt  <= '0;
        x0_r <= in_x0;
        y0_r <= in_y0;
        for (int i = 0; i < 5; i++) begin
          pa[i] <= in_a[i];
          pb[i] <= in_b[i];
        end
      end
    end
  end

  gda_addr_decoder #(.N(5), .GW(GW), .RW(RW)) u_dec_a (.addr(addr_a), .group(grp_a), .rot(rot_a));
  gda_addr_decoder #(.N(5), .GW(GW), .RW(RW)) u_dec_b (.addr(addr_b), .group(grp_b), .rot(rot_b));

  gda_lookup #(.N(5), .W(W), .COEF(P11_C), .GW(GW), .RW(RW)) u_cos_a (.group(grp_a), .rot(rot_a), .pp(ca));
  gda_lookup #(.N(5), .W(W), .COEF(P11_C), .GW(GW), .RW(RW)) u_cos_b (.group(grp_b), .rot(rot_b), .pp(cb));
  gda_lookup #(.N(5), .W(W), .COEF(P11_S), .GW(GW), .RW(RW)) u_sin_a (.group(grp_a), .rot(rot_a), .pp(sa));
  gda_lookup #(.N(5), .W(W), .COEF(P11_S), .GW(GW), .RW(RW)) u_sin_b (.group(grp_b), .rot(rot_b), .pp(sb));

  for (genvar k = 0; k < 5; k++) begin : g_addsub
    assign pp_re[k] = (W+1)'(ca[k]) + (W+1)'(cb[k]);
    assign pp_im[k] = (W+1)'(sa[k]) - (W+1)'(sb[k]);
  end

  gda_accumulator #(.N(5), .W(W+1), .AW(AW)) u_acc_re (
    .clk, .rst_n, .en(busy), .first(cnt == '0), .pp(pp_re), .acc(r_re)
  );
  gda_accumulator #(.N(5), .W(W+1), .AW(AW)) u_acc_im (
    .clk, .rst_n, .en(busy), .first(cnt == '0), .pp(pp_im), .acc(r_im)
  );

endmodule
