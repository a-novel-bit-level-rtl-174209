// tb_cordic_cmul: self-checking testbench of the CORDIC complex multiplier.
//
// Angles are turned into direction bits the way the document does it: the
// running sum of elementary angles atan(2^-i) moves toward the target, so
// s_i = +1 while the sum is below the target and -1 otherwise. The 56-degree
// example of the document is checked first (s_0..s_8 = + + - - + + + - -),
// then 300 random operands at random angles within +/-99 degrees.
// Each result is compared
//   * bit-exactly with an integer model of the same shift-and-add steps and
//     the CSD scaling constant 39797 / 2^16 = 2^-1 + 2^-3 - 2^-6 - 2^-9
//     - 2^-12 + 2^-14 + 2^-16 (round(2^16 * prod cos(atan(2^-i))), i < 11);
//   * with the exact real rotation by sum_i s_i atan(2^-i), within 2.0.
// The latency is checked: out_valid rises M + P = 11 + 7 = 18 clocks after
// the accepting clock edge, so the checker sees it on the 19th edge. Random input gaps and valid held while busy
// exercise the handshake. Mechanisms counted: both signs of every s_i and
// input back-pressure; each must occur.
module tb_cordic_cmul;
  localparam int W = 16, M = 11, G = 4, LAT = 19, NOPS = 300;
  localparam real PI = 3.14159265358979;
  localparam int CSD_SH [7] = '{1, 3, 6, 9, 12, 14, 16};
  localparam int CSD_SG [7] = '{1, 1, -1, -1, -1, 1, 1};

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  logic signed [W-1:0] in_x, in_y;
  logic [M-1:0] in_s;
  logic signed [W:0] out_x, out_y;

  cordic_cmul dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int xs [NOPS], ys [NOPS];
  logic [M-1:0] ss [NOPS];
  longint ex [NOPS], ey [NOPS];
  real rx [NOPS], ry [NOPS];

  function automatic logic [M-1:0] dirs(real theta);
    real sum;
    logic [M-1:0] s;
    sum = 0.0;
    for (int i = 0; i < M; i++) begin
      s[i] = theta >= sum;
      sum += (s[i] ? 1.0 : -1.0) * $atan(2.0 ** (-i)) * 180.0 / PI;
    end
    return s;
  endfunction

  initial begin
    for (int n = 0; n < NOPS; n++) begin
      longint x, y, t, ax, ay;
      real th, ang;
      xs[n] = $signed(16'($urandom));
      ys[n] = $signed(16'($urandom));
      if (n % 7 == 0) xs[n] = -32768;
      th = (n == 0) ? 56.0 : (real'($urandom % 19800) / 100.0 - 99.0);
      ss[n] = dirs(th);
      // integer model
      x = longint'(xs[n]) * (1 << G);
      y = longint'(ys[n]) * (1 << G);
      ang = 0.0;
      for (int i = 0; i < M; i++) begin
        t = x;
        if (ss[n][i]) begin x = x + (y >>> i); y = y - (t >>> i); end
        else          begin x = x - (y >>> i); y = y + (t >>> i); end
        ang += (ss[n][i] ? 1.0 : -1.0) * $atan(2.0 ** (-i));
      end
      ax = 0; ay = 0;
      for (int p = 0; p < 7; p++) begin
        ax += CSD_SG[p] * (x >>> CSD_SH[p]);
        ay += CSD_SG[p] * (y >>> CSD_SH[p]);
      end
      ex[n] = ax >>> G;
      ey[n] = ay >>> G;
      rx[n] = xs[n] * $cos(ang) + ys[n] * $sin(ang);
      ry[n] = -xs[n] * $sin(ang) + ys[n] * $cos(ang);
    end
  end

  // driver
  int di = 0, n_bp = 0;
  logic gap;
  always @(posedge clk) gap <= ($urandom % 4) == 0;
  assign in_valid = rst_n && !gap && di < NOPS;
  assign in_x = (di < NOPS) ? 16'(xs[di]) : '0;
  assign in_y = (di < NOPS) ? 16'(ys[di]) : '0;
  assign in_s = (di < NOPS) ? ss[di] : '0;

  int cyc = 0, t_acc [$];
  int seen_p [M], seen_m [M];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin
      di <= di + 1;
      t_acc.push_back(cyc);
      for (int i = 0; i < M; i++)
        if (in_s[i]) seen_p[i]++; else seen_m[i]++;
    end
    if (in_valid && !in_ready) n_bp++;
  end

  // checker
  int oi = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int ta;
      ta = t_acc.pop_front();
      chk($sformatf("latency op %0d", oi), cyc - ta, LAT);
      chk($sformatf("x op %0d", oi), out_x, ex[oi]);
      chk($sformatf("y op %0d", oi), out_y, ey[oi]);
      checks++;
      if (real'(out_x) - rx[oi] > 2.0 || rx[oi] - real'(out_x) > 2.0 ||
          real'(out_y) - ry[oi] > 2.0 || ry[oi] - real'(out_y) > 2.0) begin
        failures++;
        $display("FAIL real op %0d: got (%0d,%0d) expected (%f,%f)", oi, out_x, out_y, rx[oi], ry[oi]);
      end
      oi++;
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Document example: 56 degrees -> s_0..s_8 = + + - - + + + - -
    chk("56-degree directions", ss[0][8:0], 9'b001110011);
    wait (oi == NOPS);
    for (int i = 0; i < M; i++) begin
      need($sformatf("s_%0d = +1", i), seen_p[i]);
      need($sformatf("s_%0d = -1", i), seen_m[i]);
    end
    need("input back-pressure", n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS * (LAT + 6) + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d results", oi, NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
