// tb_p11_da: checks the twin 5-point GDA stage of the 11-point transforms.
// For random 8-bit vectors a and b the stage must return
//   r_re[k] = sum_m (a+b)[(m-k) mod 5] * c_m,  c_m  = round(2^12 cos(2 pi 2^m/11))
//   r_im[k] = sum_m (a-b)[(m-k) mod 5] * s'_m, s'_m = round(2^12 (-1)^m sin(2 pi 2^m/11))
// with the coefficients computed here from the formulas. Each block takes
// 8 bit cycles; blocks are offered back to back and with random gaps, and
// results must be registered on the 9th clock edge after acceptance.
module tb_p11_da;
  localparam int NB = 60;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, r_valid;
  logic signed [7:0]  in_a [5], in_b [5], in_x0, r_x0;
  logic signed [11:0] in_y0, r_y0;
  logic signed [24:0] r_re [5], r_im [5];

  p11_da #(.IN_W(8), .W(16)) dut (.*);

  always #5 clk = ~clk;

  function automatic int rnd(input real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  int av [NB][5], bv [NB][5], x0v [NB], y0v [NB], acc_cyc [NB];
  int c [5], s [5];
  int cyc = 0, nres = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int m = 0; m < 5; m++) begin
      real th;
      th = 2.0 * 3.14159265358979 * ((1 << m) % 11) / 11.0;
      c[m] = rnd(4096.0 * $cos(th));
      s[m] = rnd(4096.0 * $sin(th)) * ((m % 2) ? -1 : 1);
    end
    foreach (av[b, i]) begin
      av[b][i] = (b == 0) ? -128 : (b == 1) ? 127 : int'($urandom % 256) - 128;
      bv[b][i] = (b == 0) ? -128 : (b == 1) ? -128 : int'($urandom % 256) - 128;
    end
    foreach (x0v[b]) begin x0v[b] = int'($urandom % 256) - 128; y0v[b] = int'($urandom % 2048) - 1024; end
    foreach (in_a[i]) begin in_a[i] = '0; in_b[i] = '0; end
    in_x0 = '0; in_y0 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      while (b > 30 && $urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      foreach (in_a[i]) begin in_a[i] = 8'(av[b][i]); in_b[i] = 8'(bv[b][i]); end
      in_x0 = 8'(x0v[b]); in_y0 = 12'(y0v[b]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      acc_cyc[b] = cyc;
    end
    @(negedge clk);
    in_valid = 0;
  end

  always @(posedge clk) if (rst_n && r_valid) begin
    checks++;
    if (cyc - acc_cyc[nres] != 9) begin failures++; $display("FAIL %0d: latency %0d", nres, cyc - acc_cyc[nres]); end
    for (int k = 0; k < 5; k++) begin
      int er, ei;
      er = 0; ei = 0;
      for (int m = 0; m < 5; m++) begin
        er += (av[nres][(m - k + 5) % 5] + bv[nres][(m - k + 5) % 5]) * c[m];
        ei += (av[nres][(m - k + 5) % 5] - bv[nres][(m - k + 5) % 5]) * s[m];
      end
      checks += 2;
      if (r_re[k] != 25'(er)) begin failures++; $display("FAIL %0d re[%0d] %0d vs %0d", nres, k, r_re[k], er); end
      if (r_im[k] != 25'(ei)) begin failures++; $display("FAIL %0d im[%0d] %0d vs %0d", nres, k, r_im[k], ei); end
    end
    checks += 2;
    if (r_x0 != 8'(x0v[nres])) failures++;
    if (r_y0 != 12'(y0v[nres])) failures++;
    nres++;
    if (nres == NB) begin
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
