// gda_accumulator: bank of N shift-accumulators for bit-serial DA.
//
// The DA inputs are two's complement words fed most significant bit first.
// In the sign-bit cycle (first = 1) each accumulator loads the negated
// partial product; in every later cycle it doubles its value and adds the
// new partial product. After the L bit cycles of a word, acc[k] holds
// sum over bits of  (+/-) pp_q * 2^(L-1-q), i.e. the exact integer
// inner product of the input words with the coefficients of output k.
// This is the general GDA form u = -u_0 + sum_q u_q 2^-q scaled by 2^(L-1);
// feeding the MSB first keeps the arithmetic exact without a wider fraction.
//
// en gates the update; acc holds when en is low. Reset clears the bank.
module gda_accumulator #(
  parameter int unsigned N  = 3,
  parameter int unsigned W  = 16,  // partial product width
  parameter int unsigned AW = 32   // accumulator width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 first,   // this cycle carries the sign bits
  input  logic signed [W-1:0]  pp  [N],
  output logic signed [AW-1:0] acc [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) acc[k] <= '0;
    end else if (en) begin
      for (int k = 0; k < N; k++)
        acc[k] <= first ? -AW'(pp[k]) : (acc[k] <<< 1) + AW'(pp[k]);
    end
  end

endmodule
