// p11_gda: 1-D 11-point DFT or DHT of real data on GDA units.
//
// For a block of eleven signed samples x(0)..x(10) it computes either the
// DFT  Y(k) = sum_n x(n) e^(-j 2 pi n k / 11)   (XFORM_DFT, complex output)
// or the DHT H(k) = sum_n x(n) cas(2 pi n k / 11) (XFORM_DHT, real output).
// 11 is prime, so with the generator g = 2 the ten non-DC outputs are a
// 10-point cyclic convolution of the permuted input. Its coefficients
// repeat (cosine) or change sign (sine) after five steps, so only five
// outputs need computing; the other five are hard-wired sums/differences.
// The 10-point convolution is done as two 5-point GDA convolutions, each
// with an 8-row group memory instead of the 32 rows plain DA would need.
//
// Pipeline: p11_inbuf (11 cycles fill, permutation) -> p11_da (8 bit
// cycles: two address decoders, cosine and sine group memories, rotators,
// adders/subtractors, accumulators) -> p11_outbuf (output adders,
// natural-order serial output). One block per 11 cycles when fed
// continuously, bound by the one-sample-per-cycle input.
//
// Interface: samples on in_valid/in_ready; results on out_valid with
// out_index = k and out_re/out_im (out_im = 0 for the DHT), scaled by
// 2^OUT_FRAC. The DA word length equals the input width (8 bits).
module p11_gda #(
  parameter gda_pkg::xform_e XFORM = gda_pkg::XFORM_DFT,
  parameter int unsigned IN_W     = 8,
  parameter int unsigned W        = 16,
  parameter int unsigned OUT_W    = 16,
  parameter int unsigned OUT_FRAC = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic [3:0]              out_index,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);

  localparam int unsigned SW = IN_W + 4;
  localparam int unsigned AW = W + IN_W + 1;

  logic                   b_valid, b_ready;
  logic signed [IN_W-1:0] b_a [5];
  logic signed [IN_W-1:0] b_b [5];
  logic signed [IN_W-1:0] b_x0;
  logic signed [SW-1:0]   b_y0;
  logic                   r_valid;
  logic signed [AW-1:0]   r_re [5];
  logic signed [AW-1:0]   r_im [5];
  logic signed [IN_W-1:0] r_x0;
  logic signed [SW-1:0]   r_y0;

  p11_inbuf #(.IN_W(IN_W), .SW(SW)) u_in (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(b_valid), .out_ready(b_ready),
    .out_a(b_a), .out_b(b_b), .out_x0(b_x0), .out_y0(b_y0)
  );

  p11_da #(.IN_W(IN_W), .SW(SW), .W(W), .AW(AW)) u_da (
    .clk, .rst_n,
    .in_valid(b_valid), .in_ready(b_ready),
    .in_a(b_a), .in_b(b_b), .in_x0(b_x0), .in_y0(b_y0),
    .r_valid, .r_re, .r_im, .r_x0, .r_y0
  );

  p11_outbuf #(.XFORM(XFORM), .IN_W(IN_W), .SW(SW), .AW(AW),
               .OUT_W(OUT_W), .OUT_FRAC(OUT_FRAC)) u_out (
    .clk, .rst_n,
    .r_valid, .r_re, .r_im, .r_x0, .r_y0,
    .out_valid, .out_index, .out_re, .out_im
  );

endmodule
