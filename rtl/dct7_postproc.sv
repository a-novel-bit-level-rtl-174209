// dct7_postproc: post-processing stage of the 7-point DCT.
//
// Turns each kernel triple into DCT outputs:
//     Y(k) = [2 T(k) + x(0)] * cos(pi k / 14).
// The doubling is wiring (a one-bit shift) and x(0) is aligned to the
// 2^14 scale of T. The multiplication by the fixed cosine is serial: one
// shift-and-add multiplier per output word walks the 16 coefficient bits
// LSB first (the last, sign, bit subtracts), so three multipliers finish a
// triple in 16 cycles, exactly one DA pass of the kernel, and the even
// triple is multiplied while the kernel computes the odd one.
//
// Output scaling: y_out = floor(product / 2^(28 - OUT_FRAC)), i.e. Y(k) with
// OUT_FRAC fractional bits; y_y0 is Y(0) on the same scale.
// Timing: t_valid loads a triple; 16 cycles later y_valid pulses for one
// cycle with y_odd = t_odd (even: k = 2, 6, 4; odd: k = 5, 1, 3). A new
// triple may arrive in the cycle the previous one completes.
// The serial multiplier and its word lengths are this design's choices; the
// document states only that the cosines are applied serially.
module dct7_postproc #(
  parameter int unsigned XW       = 11,
  parameter int unsigned AW       = 32,
  parameter int unsigned CW       = 16,  // cosine coefficient width
  parameter int unsigned OUT_W    = 18,
  parameter int unsigned OUT_FRAC = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    t_valid,
  input  logic                    t_odd,
  input  logic signed [AW-1:0]    t_out [3],
  input  logic signed [XW-1:0]    t_x0,
  input  logic signed [XW-1:0]    t_y0,
  output logic                    y_valid,
  output logic                    y_odd,
  output logic signed [OUT_W-1:0] y_out [3],
  output logic signed [OUT_W-1:0] y_y0
);
  import gda_pkg::*;

  localparam int unsigned FR = DCT7_COEF_FRAC;
  localparam int unsigned ZW = AW + 2;
  localparam int unsigned PW = ZW + CW;
  localparam int unsigned SH = 2 * FR - OUT_FRAC;
  // Output index of each word of a triple.
  localparam int KEVEN [3] = '{2, 6, 4};
  localparam int KODD  [3] = '{5, 1, 3};

  logic                   busy, odd_r;
  logic [$clog2(CW)-1:0]  cnt;
  logic signed [PW-1:0]   zsh  [3];   // Z shifted left by the bit count
  logic [CW-1:0]          csh  [3];   // coefficient, shifted right
  logic signed [PW-1:0]   prod [3];
  logic signed [PW-1:0]   nxt  [3];
  logic signed [XW-1:0]   y0_r;
  logic                   lastbit;

  assign lastbit = busy && (cnt == ($clog2(CW))'(CW - 1));

  always_comb begin
    for (int j = 0; j < 3; j++) begin
      if (!csh[j][0])   nxt[j] = prod[j];
      else if (lastbit) nxt[j] = prod[j] - zsh[j];
      else              nxt[j] = prod[j] + zsh[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      odd_r   <= 1'b0;
      cnt     <= '0;
      y0_r    <= '0;
      y_valid <= 1'b0;
      y_odd   <= 1'b0;
      y_y0    <= '0;
      for (int j = 0; j < 3; j++) begin
        zsh[j]   <= '0;
        csh[j]   <= '0;
        prod[j]  <= '0;
        y_out[j] <= '0;
      end
    end else begin
      y_valid <= lastbit;
      if (busy) begin
        cnt <= cnt + 1'b1;
        for (int j = 0; j < 3; j++) begin
          prod[j] <= nxt[j];
          zsh[j]  <= zsh[j] <<< 1;
          csh[j]  <= csh[j] >> 1;
        end
        if (lastbit) begin
          busy  <= 1'b0;
          y_odd <= odd_r;
          y_y0  <= OUT_W'(y0_r) <<< OUT_FRAC;
          for (int j = 0; j < 3; j++) y_out[j] <= OUT_W'(nxt[j] >>> SH);
        end
      end
      if (t_valid) begin
        busy  <= 1'b1;
        cnt   <= '0;
        odd_r <= t_odd;
        y0_r  <= t_y0;
        for (int j = 0; j < 3; j++) begin
          zsh[j]  <= (PW'(t_out[j]) <<< 1) + (PW'(t_x0) <<< FR);
          csh[j]  <= CW'(DCT7_PC[t_odd ? KODD[j] : KEVEN[j]]);
          prod[j] <= '0;
        end
      end
    end
  end

endmodule
