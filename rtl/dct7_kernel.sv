// dct7_kernel: DA processing stage of the 7-point DCT (one GDA unit).
//
// The 6-point kernel T(k) = sum_{n=1..6} x(n) cos(pi n k / 7) splits, by the
// symmetry of the cosine, into two 3-point cyclic convolutions with the same
// coefficients {cos 2a, cos 6a, cos 4a}, a = pi/7:
//   even: [T(2) T(6) T(4)] from e = {x6+x1, x4+x3, x2+x5}
//   odd : [T(5) T(1) T(3)] from d = {x6-x1, x4-x3, x2-x5}
// with row k of each circulant taking word (n-k) mod 3 against coefficient n.
// Because both share one coefficient set they share one group memory: a
// single gda_unit (3-bit address decoder, 4-row group memory, 3-word barrel
// rotator, 3 accumulators) runs the even set for L bit cycles and then the
// odd set for L bit cycles, so a block takes 2L = 32 cycles, the rate the
// document gives for its chip (7 samples per 32 cycles).
//
// Word-parallel, bit-serial: the sum and difference words are formed once
// when a block is accepted and held in parallel-to-serial registers that feed
// the decoder MSB first. Timing: one cycle after the last bit of a pass,
// t_valid pulses with t_odd telling which triple t_out holds (scaled by
// 2^14, the coefficient scale); t_x0 and t_y0 travel alongside. A new block
// is accepted in the last bit cycle of the odd pass, so back-to-back blocks
// keep the unit busy every cycle.
module dct7_kernel #(
  parameter int unsigned XW = 11,   // width of x(n)
  parameter int unsigned L  = 16,   // DA word length (bit cycles per pass)
  parameter int unsigned W  = 16,   // group memory word width
  parameter int unsigned AW = W + L // accumulator width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [XW-1:0] in_x [7],
  input  logic signed [XW-1:0] in_y0,
  output logic                 t_valid,
  output logic                 t_odd,
  output logic signed [AW-1:0] t_out [3],
  output logic signed [XW-1:0] t_x0,
  output logic signed [XW-1:0] t_y0
);
  import gda_pkg::*;

  // Input pairs {6,1}, {4,3}, {2,5}: column n of both circulants.
  localparam int PA [3] = '{6, 4, 2};
  localparam int PB [3] = '{1, 3, 5};

  logic                 busy, phase;
  logic [$clog2(L)-1:0] cnt;
  logic [L-1:0]         pe [3];
  logic [L-1:0]         po [3];
  logic signed [XW-1:0] x0_r, y0_r;
  logic [2:0]           addr;
  logic                 last, accept;

  // Sign-extend to the DA word length before the sum and difference.
  logic signed [L-1:0] xa [3], xb [3];
  for (genvar j = 0; j < 3; j++) begin : g_ext
    assign xa[j] = L'(in_x[PA[j]]);
    assign xb[j] = L'(in_x[PB[j]]);
  end

  assign last     = busy && (cnt == ($clog2(L))'(L - 1));
  assign in_ready = !busy || (phase && last);
  assign accept   = in_valid && in_ready;

  for (genvar j = 0; j < 3; j++) begin : g_addr
    assign addr[j] = phase ? po[j][L-1] : pe[j][L-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      phase   <= 1'b0;
      cnt     <= '0;
      x0_r    <= '0;
      y0_r    <= '0;
      t_valid <= 1'b0;
      t_odd   <= 1'b0;
      t_x0    <= '0;
      t_y0    <= '0;
      for (int j = 0; j < 3; j++) begin
        pe[j] <= '0;
        po[j] <= '0;
      end
    end else begin
      t_valid <= last;
      if (last) begin
        t_odd <= phase;
        t_x0  <= x0_r;
        t_y0  <= y0_r;
      end
      if (busy) begin
        for (int j = 0; j < 3; j++) begin
          if (phase) po[j] <= po[j] << 1;
          else       pe[j] <= pe[j] << 1;
        end
        cnt <= cnt + 1'b1;
        if (last) begin
          cnt   <= '0;
          phase <= !phase;
          if (phase) busy <= 1'b0;
        end
      end
      if (accept) begin
        busy  <= 1'b1;
        phase <= 1'b0;
        cnt   <= '0;
        x0_r  <= in_x[0];
        y0_r  <= in_y0;
        for (int j = 0; j < 3; j++) begin
          pe[j] <= xa[j] + xb[j];
          po[j] <= xa[j] - xb[j];
        end
      end
    end
  end

  gda_unit #(.N(3), .W(W), .AW(AW), .COEF(DCT7_KC)) u_gdau (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (busy),
    .first(cnt == '0),
    .addr (addr),
    .acc  (t_out)
  );

endmodule
