// gda_dsst_top: the group distributed arithmetic (GDA) transform designs,
// side by side.
//
// Four independent prime-length transform engines share the GDA building
// blocks (address decoder, group memory, barrel rotator, accumulators) but
// no signals:
//   dct7 - 1-D 7-point DCT, one GDA unit time-shared by the even and odd
//          3-point kernels, 7 samples per 32 cycles (the fabricated design)
//   dft11 - 1-D 11-point DFT of real data, two 5-point GDA convolutions
//   dht11 - 1-D 11-point DHT, the same datapath with the Hartley output
//          combination
//   dht29 - 1-D 29-point DHT, four 7-point GDA lookups over four iterations
//          (28-point convolution split 4 x 7), 29 samples per 32 cycles
// Beside them sits the iterative CORDIC complex multiplier that the
// document pairs with GDA for the pre- and post-processing rotations of
// cyclic-convolution DFTs of other lengths:
//   cordic - rotation of (x, y) by sum_i s_i atan(2^-i), 11 iterations and
//            CSD scaling, one operand per 19 cycles
// Each has its own sample input (valid/ready) and natural-order serial
// output port; all run on one clock and one active-low asynchronous reset.
module gda_dsst_top (
  input  logic               clk,
  input  logic               rst_n,
  // 7-point DCT
  input  logic               dct_in_valid,
  output logic               dct_in_ready,
  input  logic signed [7:0]  dct_in_data,
  output logic               dct_out_valid,
  output logic [2:0]         dct_out_index,
  output logic signed [17:0] dct_out_data,
  // 11-point DFT
  input  logic               dft_in_valid,
  output logic               dft_in_ready,
  input  logic signed [7:0]  dft_in_data,
  output logic               dft_out_valid,
  output logic [3:0]         dft_out_index,
  output logic signed [15:0] dft_out_re,
  output logic signed [15:0] dft_out_im,
  // 11-point DHT
  input  logic               dht_in_valid,
  output logic               dht_in_ready,
  input  logic signed [7:0]  dht_in_data,
  output logic               dht_out_valid,
  output logic [3:0]         dht_out_index,
  output logic signed [15:0] dht_out_data,
  // 29-point DHT
  input  logic               dht29_in_valid,
  output logic               dht29_in_ready,
  input  logic signed [7:0]  dht29_in_data,
  output logic               dht29_out_valid,
  output logic [4:0]         dht29_out_index,
  output logic signed [15:0] dht29_out_data,
  // CORDIC complex multiplier
  input  logic               cordic_in_valid,
  output logic               cordic_in_ready,
  input  logic signed [15:0] cordic_in_x,
  input  logic signed [15:0] cordic_in_y,
  input  logic [10:0]        cordic_in_s,
  output logic               cordic_out_valid,
  output logic signed [16:0] cordic_out_x,
  output logic signed [16:0] cordic_out_y
);

  logic signed [15:0] dht_im_unused;

  dct7_gda u_dct7 (
    .clk, .rst_n,
    .in_valid (dct_in_valid), .in_ready(dct_in_ready), .in_data(dct_in_data),
    .out_valid(dct_out_valid), .out_index(dct_out_index), .out_data(dct_out_data)
  );

  p11_gda #(.XFORM(gda_pkg::XFORM_DFT)) u_dft11 (
    .clk, .rst_n,
    .in_valid (dft_in_valid), .in_ready(dft_in_ready), .in_data(dft_in_data),
    .out_valid(dft_out_valid), .out_index(dft_out_index),
    .out_re(dft_out_re), .out_im(dft_out_im)
  );

  p11_gda #(.XFORM(gda_pkg::XFORM_DHT)) u_dht11 (
    .clk, .rst_n,
    .in_valid (dht_in_valid), .in_ready(dht_in_ready), .in_data(dht_in_data),
    .out_valid(dht_out_valid), .out_index(dht_out_index),
    .out_re(dht_out_data), .out_im(dht_im_unused)
  );

  dht29_gda u_dht29 (
    .clk, .rst_n,
    .in_valid (dht29_in_valid), .in_ready(dht29_in_ready), .in_data(dht29_in_data),
    .out_valid(dht29_out_valid), .out_index(dht29_out_index), .out_data(dht29_out_data)
  );

  cordic_cmul u_cordic (
    .clk, .rst_n,
    .in_valid (cordic_in_valid), .in_ready(cordic_in_ready),
    .in_x(cordic_in_x), .in_y(cordic_in_y), .in_s(cordic_in_s),
    .out_valid(cordic_out_valid), .out_x(cordic_out_x), .out_y(cordic_out_y)
  );

endmodule
