// tb_gda_dsst_top: end-to-end testbench of the four GDA transform engines
// and the CORDIC complex multiplier.
//
// Runs the top with its default parameters. Random 8-bit blocks go to the
// 7-point DCT, the 11-point DFT, the 11-point DHT and the 29-point DHT at
// once, with random
// idle cycles on the inputs; every output word is compared bit-exactly with
// transforms computed here from their definitions (same coefficient
// rounding and output scaling) and its index with the natural order.
// It also counts how often the mechanisms of the GDA datapaths occur and
// fails if one never does: a DA address that is a group seed (no rotation),
// one that needs the barrel rotator, every group of each decoder, the even
// and the odd DCT pass, the hard-wired second half of the 11-point outputs,
// every group of the 7-bit decoders and all four iterations of the 29-point
// DHT, and input back-pressure (in_ready low while data waits).
// The CORDIC gets NCOR random operands at random angles; its results are
// compared bit-exactly with an integer model of the shift-and-add steps and
// CSD scaling, and both signs of every direction bit must occur.
module tb_gda_dsst_top;
  localparam int NBLK = 60, NCOR = 60;
  localparam int CSD_SH [7] = '{1, 3, 6, 9, 12, 14, 16};
  localparam int CSD_SG [7] = '{1, 1, -1, -1, -1, 1, 1};
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic dct_in_valid, dct_in_ready; logic signed [7:0] dct_in_data;
  logic dct_out_valid; logic [2:0] dct_out_index; logic signed [17:0] dct_out_data;
  logic dft_in_valid, dft_in_ready; logic signed [7:0] dft_in_data;
  logic dft_out_valid; logic [3:0] dft_out_index; logic signed [15:0] dft_out_re, dft_out_im;
  logic dht_in_valid, dht_in_ready; logic signed [7:0] dht_in_data;
  logic dht_out_valid; logic [3:0] dht_out_index; logic signed [15:0] dht_out_data;
  logic dht29_in_valid, dht29_in_ready; logic signed [7:0] dht29_in_data;
  logic dht29_out_valid; logic [4:0] dht29_out_index; logic signed [15:0] dht29_out_data;
  logic cordic_in_valid, cordic_in_ready; logic signed [15:0] cordic_in_x, cordic_in_y;
  logic [10:0] cordic_in_s;
  logic cordic_out_valid; logic signed [16:0] cordic_out_x, cordic_out_y;

  gda_dsst_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic int rnd(input real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  // ---------------- stimulus and reference models ----------------
  int ys [NBLK][7];
  int xs [NBLK][11];
  int hs [NBLK][11];
  longint e_dct [NBLK][7];
  longint e_re [NBLK][11], e_im [NBLK][11], e_h [NBLK][11];
  int zs [NBLK][29];
  longint e_z [NBLK][29];

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      for (int n = 0; n < 7; n++)  ys[b][n] = $signed(8'($urandom));
      for (int n = 0; n < 11; n++) xs[b][n] = $signed(8'($urandom));
      for (int n = 0; n < 11; n++) hs[b][n] = $signed(8'($urandom));
      for (int n = 0; n < 29; n++) zs[b][n] = $signed(8'($urandom));
    end
    for (int b = 0; b < NBLK; b++) begin
      int x[7]; int y0;
      x[6] = ys[b][6];
      for (int n = 5; n >= 0; n--) x[n] = ys[b][n] - x[n+1];
      y0 = 0;
      for (int n = 0; n < 7; n++) y0 += ys[b][n];
      e_dct[b][0] = longint'(y0) <<< 6;
      for (int k = 1; k < 7; k++) begin
        longint t;
        t = 0;
        for (int n = 1; n < 7; n++) t += longint'(x[n]) * rnd(16384.0 * $cos(PI * n * k / 7.0));
        e_dct[b][k] = ((2 * t + longint'(x[0]) * 16384) * rnd(16384.0 * $cos(PI * k / 14.0))) >>> 22;
      end
      for (int k = 0; k < 11; k++) begin
        longint cr, ci, hc, hsn;
        cr = 0; ci = 0; hc = 0; hsn = 0;
        for (int n = 0; n < 11; n++) begin
          real ang;
          ang = 2.0 * PI * ((n * k) % 11) / 11.0;
          cr  += longint'(xs[b][n]) * rnd(4096.0 * $cos(ang));
          ci  -= longint'(xs[b][n]) * rnd(4096.0 * $sin(ang));
          hc  += longint'(hs[b][n]) * rnd(4096.0 * $cos(ang));
          hsn += longint'(hs[b][n]) * rnd(4096.0 * $sin(ang));
        end
        e_re[b][k] = cr >>> 8;
        e_im[b][k] = ci >>> 8;
        e_h[b][k]  = (hc + hsn) >>> 8;
      end
      for (int k = 0; k < 29; k++) begin
        longint acc;
        acc = longint'(zs[b][0]) * 4096;
        for (int n = 1; n < 29; n++)
          acc += longint'(zs[b][n]) * rnd(4096.0 * ($cos(2.0 * PI * ((n * k) % 29) / 29.0) +
                                                   $sin(2.0 * PI * ((n * k) % 29) / 29.0)));
        if (k == 0) begin
          acc = 0;
          for (int n = 0; n < 29; n++) acc += zs[b][n];
          e_z[b][k] = acc * 4;
        end else e_z[b][k] = acc >>> 10;
      end
    end
  end

  // ---------------- drivers with random idle cycles ----------------
  int di = 0, fi = 0, hi = 0, zi = 0;
  logic dgap, fgap, hgap, zgap;
  always @(posedge clk) begin
    zgap <= ($urandom % 8) == 0;
    dgap <= ($urandom % 8) == 0;
    fgap <= ($urandom % 8) == 0;
    hgap <= ($urandom % 8) == 0;
  end
  assign dct_in_valid = rst_n && !dgap && di < NBLK * 7;
  assign dct_in_data  = (di < NBLK * 7) ? 8'(ys[di / 7][di % 7]) : '0;
  assign dft_in_valid = rst_n && !fgap && fi < NBLK * 11;
  assign dft_in_data  = (fi < NBLK * 11) ? 8'(xs[fi / 11][fi % 11]) : '0;
  assign dht_in_valid = rst_n && !hgap && hi < NBLK * 11;
  assign dht_in_data  = (hi < NBLK * 11) ? 8'(hs[hi / 11][hi % 11]) : '0;
  assign dht29_in_valid = rst_n && !zgap && zi < NBLK * 29;
  assign dht29_in_data  = (zi < NBLK * 29) ? 8'(zs[zi / 29][zi % 29]) : '0;

  // Mechanism counters.
  int n_seed = 0, n_rot = 0, n_even = 0, n_odd = 0, n_hw = 0, n_bp = 0, n_gap = 0;
  bit seen_g3 [4];
  bit seen_g5 [8];
  bit seen_g7 [20];
  bit seen_it [4];
  int n_bp29 = 0;

  always @(posedge clk) begin
    if (dct_in_valid && dct_in_ready) di <= di + 1;
    if (dft_in_valid && dft_in_ready) fi <= fi + 1;
    if (dht_in_valid && dht_in_ready) hi <= hi + 1;
    if (dht29_in_valid && dht29_in_ready) zi <= zi + 1;
    if (dht29_in_valid && !dht29_in_ready) n_bp29++;
    if (rst_n && dut.u_dht29.busy) begin
      for (int a = 0; a < 4; a++) seen_g7[dut.u_dht29.group[a]] = 1;
      seen_it[dut.u_dht29.it] = 1;
    end
    if (dct_in_valid && !dct_in_ready) n_bp++;
    if (rst_n && (dgap || fgap || hgap)) n_gap++;
    if (rst_n && dut.u_dct7.u_kernel.busy) begin
      if (dut.u_dct7.u_kernel.u_gdau.rot == 0) n_seed++; else n_rot++;
      seen_g3[dut.u_dct7.u_kernel.u_gdau.group] = 1;
    end
    if (rst_n && dut.u_dft11.u_da.busy) begin
      seen_g5[dut.u_dft11.u_da.grp_a] = 1;
      seen_g5[dut.u_dft11.u_da.grp_b] = 1;
    end
    if (rst_n && dut.u_dct7.u_kernel.t_valid) begin
      if (dut.u_dct7.u_kernel.t_odd) n_odd++; else n_even++;
    end
  end

  // ---------------- output checkers ----------------
  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  int cb = 0, cw = 0, fb = 0, fw = 0, hb = 0, hw = 0, zb = 0, zw = 0;
  always @(posedge clk) begin
    if (rst_n && dht29_out_valid) begin
      chk($sformatf("dht29 index b%0d", zb), dht29_out_index, zw);
      chk($sformatf("dht29 b%0d k%0d", zb, zw), dht29_out_data, e_z[zb][zw]);
      if (zw == 28) begin zw = 0; zb++; end else zw++;
    end
    if (rst_n && dct_out_valid) begin
      chk($sformatf("dct index b%0d", cb), dct_out_index, cw);
      chk($sformatf("dct b%0d Y(%0d)", cb, cw), dct_out_data, e_dct[cb][cw]);
      if (cw == 6) begin cw = 0; cb++; end else cw++;
    end
    if (rst_n && dft_out_valid) begin
      chk($sformatf("dft index b%0d", fb), dft_out_index, fw);
      chk($sformatf("dft re b%0d k%0d", fb, fw), dft_out_re, e_re[fb][fw]);
      chk($sformatf("dft im b%0d k%0d", fb, fw), dft_out_im, e_im[fb][fw]);
      if (fw >= 6) n_hw++;
      if (fw == 10) begin fw = 0; fb++; end else fw++;
    end
    if (rst_n && dht_out_valid) begin
      chk($sformatf("dht index b%0d", hb), dht_out_index, hw);
      chk($sformatf("dht b%0d k%0d", hb, hw), dht_out_data, e_h[hb][hw]);
      if (hw == 10) begin hw = 0; hb++; end else hw++;
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end else $display("mechanism %s: %0d", what, n);
  endtask

  // ---------------- CORDIC ----------------
  int cx [NCOR], cy [NCOR];
  logic [10:0] cs [NCOR];
  longint ecx [NCOR], ecy [NCOR];
  initial begin
    for (int n = 0; n < NCOR; n++) begin
      longint x, y, t, ax, ay;
      real th, sum;
      cx[n] = $signed(16'($urandom));
      cy[n] = $signed(16'($urandom));
      th = real'($urandom % 19800) / 100.0 - 99.0;
      sum = 0.0;
      for (int i = 0; i < 11; i++) begin
        cs[n][i] = th >= sum;
        sum += (cs[n][i] ? 1.0 : -1.0) * $atan(2.0 ** (-i)) * 180.0 / PI;
      end
      x = longint'(cx[n]) * 16;
      y = longint'(cy[n]) * 16;
      for (int i = 0; i < 11; i++) begin
        t = x;
        if (cs[n][i]) begin x = x + (y >>> i); y = y - (t >>> i); end
        else          begin x = x - (y >>> i); y = y + (t >>> i); end
      end
      ax = 0; ay = 0;
      for (int p = 0; p < 7; p++) begin
        ax += CSD_SG[p] * (x >>> CSD_SH[p]);
        ay += CSD_SG[p] * (y >>> CSD_SH[p]);
      end
      ecx[n] = ax >>> 4;
      ecy[n] = ay >>> 4;
    end
  end

  int ci = 0, co = 0, n_bpc = 0;
  int seen_sp [11], seen_sm [11];
  logic cgap;
  always @(posedge clk) begin
    cgap <= ($urandom % 4) == 0;
    if (cordic_in_valid && cordic_in_ready) begin
      ci <= ci + 1;
      for (int i = 0; i < 11; i++)
        if (cordic_in_s[i]) seen_sp[i]++; else seen_sm[i]++;
    end
    if (cordic_in_valid && !cordic_in_ready) n_bpc++;
    if (rst_n && cordic_out_valid) begin
      chk($sformatf("cordic x op %0d", co), cordic_out_x, ecx[co]);
      chk($sformatf("cordic y op %0d", co), cordic_out_y, ecy[co]);
      co++;
    end
  end
  assign cordic_in_valid = rst_n && !cgap && ci < NCOR;
  assign cordic_in_x = (ci < NCOR) ? 16'(cx[ci]) : '0;
  assign cordic_in_y = (ci < NCOR) ? 16'(cy[ci]) : '0;
  assign cordic_in_s = (ci < NCOR) ? cs[ci] : '0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (cb == NBLK && fb == NBLK && hb == NBLK && zb == NBLK && co == NCOR);
    repeat (3) @(posedge clk);
    need("DA address is a group seed (no rotation)", n_seed);
    need("DA address rotated by the barrel rotator", n_rot);
    need("DCT even pass", n_even);
    need("DCT odd pass", n_odd);
    need("hard-wired symmetric DFT outputs", n_hw);
    need("input back-pressure", n_bp);
    need("input idle cycles", n_gap);
    for (int g = 0; g < 4; g++) need($sformatf("3-bit group %0d", g), int'(seen_g3[g]));
    for (int g = 0; g < 8; g++) need($sformatf("5-bit group %0d", g), int'(seen_g5[g]));
    for (int g = 0; g < 20; g++) need($sformatf("7-bit group %0d", g), int'(seen_g7[g]));
    for (int i = 0; i < 4; i++) need($sformatf("29-point DHT iteration %0d", i), int'(seen_it[i]));
    need("29-point DHT input back-pressure", n_bp29);
    for (int i = 0; i < 11; i++) begin
      need($sformatf("CORDIC s_%0d = +1", i), seen_sp[i]);
      need($sformatf("CORDIC s_%0d = -1", i), seen_sm[i]);
    end
    need("CORDIC input back-pressure", n_bpc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 60 + 500) @(posedge clk);
    failures++;
    $display("FAIL watchdog: dct %0d dft %0d dht %0d dht29 %0d blocks, cordic %0d",
             cb, fb, hb, zb, co);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
