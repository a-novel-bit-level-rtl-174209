// p11_outbuf: post-processing adders and output buffer of the 11-point
// DFT/DHT.
//
// From the two 5-word accumulator banks (cosine part R_p, sine part I_p,
// p = 0..4, output k = 2^p mod 11) the outputs follow by adding x(0) and by
// the symmetry of cosine (even) and sine (odd) about N/2, which gives the
// second half k' = 2^(p+5) mod 11 = 11 - k for free:
//   S_p = (-1)^p I_p (undoes the sign swap made for the sine memory)
//   DFT: Y(k)  = x0 + R_p - j S_p,   Y(11-k) = x0 + R_p + j S_p
//   DHT: H(k)  = x0 + R_p + S_p,     H(11-k) = x0 + R_p - S_p
// plus Y(0) = H(0) = sum x(n). XFORM selects the transform.
//
// The eleven results are written to a drain bank in natural order and shifted
// out one per cycle (out_index = k); a new block may load in the cycle the
// previous one shows its last word. Outputs carry OUT_FRAC fractional bits
// (floor). The document describes the adders/subtractors and the
// hard-wired second half; the drain order and scaling are this design's.
module p11_outbuf #(
  parameter gda_pkg::xform_e XFORM = gda_pkg::XFORM_DFT,
  parameter int unsigned IN_W     = 8,
  parameter int unsigned SW       = IN_W + 4,
  parameter int unsigned AW       = 25,
  parameter int unsigned OUT_W    = 16,
  parameter int unsigned OUT_FRAC = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    r_valid,
  input  logic signed [AW-1:0]    r_re [5],
  input  logic signed [AW-1:0]    r_im [5],
  input  logic signed [IN_W-1:0]  r_x0,
  input  logic signed [SW-1:0]    r_y0,
  output logic                    out_valid,
  output logic [3:0]              out_index,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);
  import gda_pkg::*;

  localparam int unsigned FR = P11_COEF_FRAC;
  localparam int unsigned SH = FR - OUT_FRAC;
  localparam int unsigned VW = AW + 2;
  localparam int KLO [5] = '{1, 2, 4, 8, 5};
  localparam int KHI [5] = '{10, 9, 7, 3, 6};

  logic signed [VW-1:0]    base [5], s [5];
  logic signed [VW-1:0]    v_re [11], v_im [11];
  logic signed [OUT_W-1:0] d_re [11], d_im [11];
  logic [3:0]              dcnt;
  logic                    draining;

  always_comb begin
    v_re[0] = VW'(r_y0) <<< FR;
    v_im[0] = '0;
    for (int p = 0; p < 5; p++) begin
      base[p] = (VW'(r_x0) <<< FR) + VW'(r_re[p]);
      s[p]    = p[0] ? -VW'(r_im[p]) : VW'(r_im[p]);
      if (XFORM == XFORM_DFT) begin
        v_re[KLO[p]] = base[p];
        v_im[KLO[p]] = -s[p];
        v_re[KHI[p]] = base[p];
        v_im[KHI[p]] = s[p];
      end else begin
        v_re[KLO[p]] = base[p] + s[p];
        v_im[KLO[p]] = '0;
        v_re[KHI[p]] = base[p] - s[p];
        v_im[KHI[p]] = '0;
      end
    end
  end

  assign out_valid = draining;
  assign out_index = dcnt;
  assign out_re    = d_re[0];
  assign out_im    = d_im[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      draining <= 1'b0;
      dcnt     <= '0;
      for (int i = 0; i < 11; i++) begin
        d_re[i] <= '0;
        d_im[i] <= '0;
      end
    end else begin
      if (draining) begin
        for (int i = 0; i < 10; i++) begin
          d_re[i] <= d_re[i+1];
          d_im[i] <= d_im[i+1];
        end
        dcnt <= dcnt + 4'd1;
        if (dcnt == 4'd10) draining <= 1'b0;
      end
      if (r_valid) begin
        for (int i = 0; i < 11; i++) begin
          d_re[i] <= OUT_W'(v_re[i] >>> SH);
          d_im[i] <= OUT_W'(v_im[i] >>> SH);
        end
        draining <= 1'b1;
        dcnt     <= '0;
      end
    end
  end

endmodule
