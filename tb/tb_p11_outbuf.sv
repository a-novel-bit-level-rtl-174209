// tb_p11_outbuf: checks the output mapping of the 11-point transforms for
// both the DFT and the DHT variant. For random 8-bit blocks x(0..10) the
// testbench forms the DA results R_p and I_p the way the GDA stage does and
// drives them in. The expected outputs come straight from the transform
// definitions with the same Q12 rounding of each cosine and sine:
//   DFT  Y(k) = sum_n x(n) (C(nk) - j S(nk)),   DHT  H(k) = sum_n x(n) (C(nk) + S(nk)),
// with 4 fraction bits kept (floor). The 11 words must be streamed in
// natural order, one per clock, starting the edge after the results arrive.
module tb_p11_outbuf;
  localparam int NB = 40;
  localparam int AI [5] = '{1, 9, 4, 3, 5};
  localparam int BI [5] = '{10, 2, 7, 8, 6};
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, r_valid = 0;
  logic signed [24:0] r_re [5], r_im [5];
  logic signed [7:0]  r_x0;
  logic signed [11:0] r_y0;
  logic        f_valid, h_valid;
  logic [3:0]  f_index, h_index;
  logic signed [15:0] f_re, f_im, h_re, h_im;

  p11_outbuf #(.XFORM(gda_pkg::XFORM_DFT)) u_dft (
    .clk, .rst_n, .r_valid, .r_re, .r_im, .r_x0, .r_y0,
    .out_valid(f_valid), .out_index(f_index), .out_re(f_re), .out_im(f_im));
  p11_outbuf #(.XFORM(gda_pkg::XFORM_DHT)) u_dht (
    .clk, .rst_n, .r_valid, .r_re, .r_im, .r_x0, .r_y0,
    .out_valid(h_valid), .out_index(h_index), .out_re(h_re), .out_im(h_im));

  always #5 clk = ~clk;

  function automatic int rnd(input real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  int fr [NB][11], fi [NB][11], hr [NB][11];
  int drv_cyc [NB];
  int cyc = 0, nout = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int c [5], s [5];
    int cq [11], sq [11];
    for (int m = 0; m < 5; m++) begin
      real th;
      th = 2.0 * 3.14159265358979 * ((1 << m) % 11) / 11.0;
      c[m] = rnd(4096.0 * $cos(th));
      s[m] = rnd(4096.0 * $sin(th)) * ((m % 2) ? -1 : 1);
    end
    for (int i = 0; i < 11; i++) begin
      cq[i] = rnd(4096.0 * $cos(2.0 * 3.14159265358979 * i / 11.0));
      sq[i] = rnd(4096.0 * $sin(2.0 * 3.14159265358979 * i / 11.0));
    end
    foreach (r_re[i]) begin r_re[i] = '0; r_im[i] = '0; end
    r_x0 = '0; r_y0 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NB; b++) begin
      int x [11];
      int y0;
      foreach (x[n]) x[n] = (b == 0) ? -128 : (b == 1) ? ((n % 2) ? 127 : -128) : int'($urandom % 256) - 128;
      y0 = 0;
      foreach (x[n]) y0 += x[n];
      for (int k = 0; k < 11; k++) begin
        int re, im;
        re = x[0] * 4096; im = 0;
        for (int n = 1; n < 11; n++) begin
          re += x[n] * cq[(n * k) % 11];
          im += x[n] * sq[(n * k) % 11];
        end
        fr[b][k] = (k == 0) ? y0 * 16 : re >>> 8;
        fi[b][k] = (k == 0) ? 0 : (-im) >>> 8;
        hr[b][k] = (k == 0) ? y0 * 16 : (re + im) >>> 8;
      end
      @(negedge clk);
      r_valid = 1;
      for (int p = 0; p < 5; p++) begin
        int er, ei;
        er = 0; ei = 0;
        for (int m = 0; m < 5; m++) begin
          er += (x[AI[(m - p + 5) % 5]] + x[BI[(m - p + 5) % 5]]) * c[m];
          ei += (x[AI[(m - p + 5) % 5]] - x[BI[(m - p + 5) % 5]]) * s[m];
        end
        r_re[p] = 25'(er); r_im[p] = 25'(ei);
      end
      r_x0 = 8'(x[0]); r_y0 = 12'(y0);
      @(posedge clk);
      drv_cyc[b] = cyc;
      @(negedge clk);
      r_valid = 0;
      repeat (10 + $urandom % 3) @(negedge clk);
    end
  end

  always @(posedge clk) if (rst_n && f_valid) begin
    int b, k;
    b = nout / 11;
    k = nout % 11;
    checks += 4;
    if (!h_valid || f_index != 4'(k) || h_index != 4'(k) || cyc - drv_cyc[b] != k + 1) begin
      failures++; $display("FAIL block %0d word %0d: index/timing", b, k);
    end
    if (f_re != 16'(fr[b][k]) || f_im != 16'(fi[b][k])) begin
      failures++; $display("FAIL DFT block %0d Y(%0d): %0d,%0d vs %0d,%0d", b, k, f_re, f_im, fr[b][k], fi[b][k]);
    end
    if (h_re != 16'(hr[b][k])) begin
      failures++; $display("FAIL DHT block %0d H(%0d): %0d vs %0d", b, k, h_re, hr[b][k]);
    end
    if (h_im != 16'd0) failures++;
    nout++;
    if (nout == 11 * NB) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
