// cordic_cmul: iterative CORDIC complex multiplier (circular mode), the
// serial rotator used for the pre- and post-processing multiplications of a
// cyclic-convolution DFT.
//
// It rotates the vector (x, y) by an angle theta:
//   x' = x cos(theta) + y sin(theta),   y' = -x sin(theta) + y cos(theta).
// As in the document, theta is written as a sum of elementary angles
// theta_i = atan(2^-i), i = 0..M-1, each taken with a sign s_i = +/-1, and
// the rotation is done in two stages on one shift-and-add unit:
//   1. M CORDIC iterations, one per clock:
//        x <- x + s_i (y >>> i),   y <- y - s_i (x >>> i);
//   2. scaling by K_M = prod cos(theta_i), written in canonical signed digits
//      K_M = sum_p k_p 2^-i_p (k_p = +/-1): one shifted add per nonzero
//      digit, the first one a plain load.
// Because every |s_i| = 1, K_M is a constant. Its CSD digits are derived at
// elaboration from round(K_M * 2^KF); the direction bits s_i are supplied
// with each operand, precomputed for the wanted angle. Bit i of in_s is 1
// for s_i = +1 and 0 for s_i = -1.
//
// Own choices: word-parallel datapath with one iteration or scaling step
// per clock, G guard fraction bits and 2 guard integer bits inside, output
// floored to W+1 bits (|result| <= sqrt(2) max|input|), valid/ready input
// handshake, one-clock output pulse, asynchronous reset.
//
// Timing: an operand is taken when in_valid and in_ready are high. The
// result is valid M + P clocks later (P = number of nonzero CSD digits of
// K_M; 11 + 7 = 18 clocks at the defaults), for one clock. in_ready is low
// while an operand is in work, so one operand is taken every M + P + 1
// clocks at most.
module cordic_cmul #(
  parameter int unsigned W  = 16,  // input word width
  parameter int unsigned M  = 11,  // CORDIC iterations (elementary angles)
  parameter int unsigned KF = 16,  // fraction bits of the scaling constant
  parameter int unsigned G  = 4    // guard fraction bits of the datapath
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [W-1:0]  in_x,
  input  logic signed [W-1:0]  in_y,
  input  logic [M-1:0]         in_s,
  output logic                 out_valid,
  output logic signed [W:0]    out_x,
  output logic signed [W:0]    out_y
);

  localparam int unsigned IW = W + 2 + G;

  // round(K_M * 2^KF), K_M = prod_{i<m} 1/sqrt(1 + 2^-2i).
  function automatic int unsigned k_scaled(input int unsigned m, input int unsigned kf);
    real k;
    k = 1.0;
    for (int unsigned i = 0; i < m; i++) k = k / $sqrt(1.0 + 2.0 ** (-2.0 * i));
    return int'(k * (2.0 ** kf) + 0.5);
  endfunction

  // CSD digit of v at weight 2^pos (LSB first recoding): -1, 0 or +1.
  function automatic int csd_digit(input int unsigned v, input int unsigned pos);
    longint r;
    int     d;
    r = longint'(v);
    d = 0;
    for (int unsigned i = 0; i <= pos; i++) begin
      if (r % 2 != 0) d = 2 - int'(r % 4);
      else            d = 0;
      r = (r - longint'(d)) / 2;
    end
    return d;
  endfunction

  // Weight position of the n-th nonzero CSD digit, most significant first.
  function automatic int csd_pos(input int unsigned v, input int unsigned n);
    int unsigned c;
    c = 0;
    for (int p = int'(KF) + 1; p >= 0; p--)
      if (csd_digit(v, p) != 0) begin
        if (c == n) return p;
        c++;
      end
    return 0;
  endfunction

  function automatic int unsigned csd_count(input int unsigned v);
    int unsigned c;
    c = 0;
    for (int p = 0; p <= int'(KF) + 1; p++)
      if (csd_digit(v, p) != 0) c++;
    return c;
  endfunction

  localparam int unsigned KQ = k_scaled(M, KF);
  localparam int unsigned P  = csd_count(KQ);
  localparam int unsigned CW = $clog2(M + P + 1);
  localparam int unsigned SW = $clog2(KF + 2);

  // Scaling steps as constant tables: right shift KF - pos and the digit sign.
  logic [SW-1:0] sc_sh  [P];
  logic          sc_neg [P];
  for (genvar n = 0; n < P; n++) begin : g_csd
    localparam int POS = csd_pos(KQ, n);
    assign sc_sh[n]  = SW'(int'(KF) - POS);
    assign sc_neg[n] = csd_digit(KQ, POS) < 0;
  end

  logic                 busy;
  logic [CW-1:0]        step;
  logic [M-1:0]         s;
  logic signed [IW-1:0] xr, yr, xa, ya;
  logic signed [IW-1:0] xs, ys;
  logic [$clog2(M)-1:0] ri;
  logic [$clog2(P)-1:0] pi;

  assign in_ready = !busy;
  assign ri = ($clog2(M))'(step);
  assign pi = ($clog2(P))'(step - CW'(M));

  // One shift-and-add unit: shifted cross terms for rotation steps, shifted
  // own terms for scaling steps.
  always_comb begin
    if (step < CW'(M)) begin
      xs = yr >>> ri;
      ys = xr >>> ri;
    end else begin
      xs = xr >>> sc_sh[pi];
      ys = yr >>> sc_sh[pi];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      step      <= '0;
      s         <= '0;
      xr        <= '0;
      yr        <= '0;
      xa        <= '0;
      ya        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (busy) begin
        step <= step + 1'b1;
        if (step < CW'(M)) begin
          // x <- x + s_i y 2^-i,  y <- y - s_i x 2^-i
          if (s[ri]) begin
            xr <= xr + xs;
            yr <= yr - ys;
          end else begin
            xr <= xr - xs;
            yr <= yr + ys;
          end
        end else begin
          if (pi == '0) begin
            xa <= sc_neg[pi] ? -xs : xs;
            ya <= sc_neg[pi] ? -ys : ys;
          end else begin
            xa <= sc_neg[pi] ? xa - xs : xa + xs;
            ya <= sc_neg[pi] ? ya - ys : ya + ys;
          end
          if (step == CW'(M + P - 1)) begin
            busy      <= 1'b0;
            out_valid <= 1'b1;
          end
        end
      end else if (in_valid) begin
        busy <= 1'b1;
        step <= '0;
        s    <= in_s;
        xr   <= IW'(in_x) <<< G;
        yr   <= IW'(in_y) <<< G;
      end
    end
  end

  assign out_x = (W+1)'(xa >>> G);
  assign out_y = (W+1)'(ya >>> G);

endmodule
