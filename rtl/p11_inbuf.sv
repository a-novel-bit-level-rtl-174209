// p11_inbuf: input buffer and data permutation of the 11-point DFT/DHT.
//
// Shifts in eleven signed samples x(0)..x(10), forms the DC term
// Y(0) = sum x(n) on the way, and presents the block permuted for the two
// 5-point cyclic convolutions of the GDA stage. With generator g = 2 and
// z_i = x(2^i mod 11), the two DA input vectors are
//   a = {z0, z6, z2, z8, z4} = {x1, x9, x4, x3, x5}
//   b = {z5, z1, z7, z3, z9} = {x10, x2, x7, x8, x6},
// i.e. the halves of the 10-point convolution with the odd positions
// swapped. The swap turns the negacyclic sine half into a plain 5-point
// cyclic convolution (valid because 5 is odd), so both the cosine and the
// sine memory see the same two address streams. The permutation is wiring.
//
// Timing: 11 cycles to fill, then the block is offered with out_valid until
// out_ready; in_ready is high while filling and in the hand-over cycle, so
// the first sample of the next block can enter as the full block leaves.
// Reset empties the buffer.
module p11_inbuf #(
  parameter int unsigned IN_W = 8,
  parameter int unsigned SW   = IN_W + 4   // width of Y(0)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic signed [IN_W-1:0] out_a [5],
  output logic signed [IN_W-1:0] out_b [5],
  output logic signed [IN_W-1:0] out_x0,
  output logic signed [SW-1:0]   out_y0
);

  localparam int AIDX [5] = '{1, 9, 4, 3, 5};
  localparam int BIDX [5] = '{10, 2, 7, 8, 6};

  logic signed [IN_W-1:0] sr [11];   // sr[10 - n] = x(n) once full
  logic signed [SW-1:0]   sum;
  logic [3:0]             cnt;
  logic                   full;

  // A finished block leaves in the same cycle the next block's first sample
  // may enter, so a continuous stream is taken without a gap.
  assign in_ready  = !full || out_ready;
  assign out_valid = full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      cnt  <= '0;
      sum  <= '0;
      for (int i = 0; i < 11; i++) sr[i] <= '0;
    end else begin
      if (full && out_ready) full <= 1'b0;
      if (in_valid && in_ready) begin
        sr[0] <= in_data;
        for (int i = 1; i < 11; i++) sr[i] <= sr[i-1];
        sum <= (cnt == 4'd0) ? SW'(in_data) : sum + SW'(in_data);
        if (cnt == 4'd10) begin
          cnt  <= '0;
          full <= 1'b1;
        end else begin
          cnt <= cnt + 4'd1;
        end
      end
    end
  end

  for (genvar i = 0; i < 5; i++) begin : g_perm
    assign out_a[i] = sr[10 - AIDX[i]];
    assign out_b[i] = sr[10 - BIDX[i]];
  end
  assign out_x0 = sr[10];
  assign out_y0 = sum;

endmodule
