// dct7_gda: 1-D 7-point DCT built on one group distributed arithmetic unit.
//
// Computes, for every block of seven signed samples y(0)..y(6),
//     Y(k) = sum_n y(n) cos(pi (2n+1) k / 14),  k = 0..6,
// through the prime-length cyclic-convolution form
//     Y(0) = sum y(n),  Y(k) = [2 T(k) + x(0)] cos(pi k / 14),
//     x(6) = y(6), x(n) = y(n) - x(n+1),
// where the kernel T splits into two 3-point cyclic convolutions that share
// one coefficient set and so one 4-row group memory.
//
// Pipeline (all stages overlap on successive blocks):
//   dct7_preproc  - bidirectional shift register + accumulator, 14 cycles
//   dct7_kernel   - one GDA unit, even then odd pass, 2 x 16 bit cycles
//   dct7_postproc - x2, + x(0), serial cosine multiply, 16 cycles per triple
//   dct7_outbuf   - reorders to natural order, one output word per cycle
// Sustained rate: one block of 7 samples per 32 cycles, as for the
// document's chip. Latency from the cycle that takes the last sample of a
// block to the cycle Y(0) leaves is 59 cycles (7 reverse-shift, 32 for the
// two DA passes, 16 for the odd multiply, plus hand-over registers);
// the testbench checks it.
//
// Interface: samples on in_valid/in_ready; results on out_valid with
// out_index = k and out_data = Y(k) scaled by 2^OUT_FRAC (no back-pressure).
module dct7_gda #(
  parameter int unsigned IN_W     = 8,   // input sample width
  parameter int unsigned L        = 16,  // DA word length
  parameter int unsigned W        = 16,  // group memory word width
  parameter int unsigned OUT_W    = 18,
  parameter int unsigned OUT_FRAC = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic [2:0]              out_index,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int unsigned XW = IN_W + 3;
  localparam int unsigned AW = W + L;

  logic                    pre_valid, pre_ready;
  logic signed [XW-1:0]    pre_x [7];
  logic signed [XW-1:0]    pre_y0;
  logic                    t_valid, t_odd;
  logic signed [AW-1:0]    t_out [3];
  logic signed [XW-1:0]    t_x0, t_y0;
  logic                    y_valid, y_odd;
  logic signed [OUT_W-1:0] y_out [3];
  logic signed [OUT_W-1:0] y_y0;

  dct7_preproc #(.IN_W(IN_W), .XW(XW)) u_pre (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid(pre_valid), .out_ready(pre_ready),
    .out_x(pre_x), .out_y0(pre_y0)
  );

  dct7_kernel #(.XW(XW), .L(L), .W(W), .AW(AW)) u_kernel (
    .clk, .rst_n,
    .in_valid(pre_valid), .in_ready(pre_ready),
    .in_x(pre_x), .in_y0(pre_y0),
    .t_valid, .t_odd, .t_out, .t_x0, .t_y0
  );

  dct7_postproc #(.XW(XW), .AW(AW), .OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC)) u_post (
    .clk, .rst_n,
    .t_valid, .t_odd, .t_out, .t_x0, .t_y0,
    .y_valid, .y_odd, .y_out, .y_y0
  );

  dct7_outbuf #(.OUT_W(OUT_W)) u_obuf (
    .clk, .rst_n,
    .y_valid, .y_odd, .y_out, .y_y0,
    .out_valid, .out_index, .out_data
  );

endmodule
