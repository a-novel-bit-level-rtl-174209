// tb_dct7_kernel: checks the two-pass 3-point GDA kernel of the 7-point
// DCT. For random x(0..6) the even pass must give [T(2), T(6), T(4)] and the
// odd pass [T(5), T(1), T(3)], where T(k) = sum_{n=1..6} x(n) * C(nk) and
// C(nk) = round(2^14 * cos(pi*n*k/7)), i.e. the direct sum of the document
// written here without the sum/difference folding. Each pass must take 16
// cycles (results registered 17 and 33 clocks after the accepting edge), and x(0)
// and Y(0) must travel with the results.
module tb_dct7_kernel;
  localparam int NB = 40;
  localparam int KE [3] = '{2, 6, 4};
  localparam int KO [3] = '{5, 1, 3};
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic signed [10:0] in_x [7];
  logic signed [10:0] in_y0;
  logic t_valid, t_odd;
  logic signed [31:0] t_out [3];
  logic signed [10:0] t_x0, t_y0;

  dct7_kernel #(.XW(11), .L(16), .W(16)) dut (.*);

  always #5 clk = ~clk;

  function automatic int rnd(input real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  int xs [NB][7];
  int y0s [NB];
  int acc_cyc [NB];
  int nres = 0;
  int nacc = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    foreach (xs[b, n]) xs[b][n] = int'($urandom % 1800) - 900;
    foreach (y0s[b]) y0s[b] = int'($urandom % 1800) - 900;
    foreach (in_x[n]) in_x[n] = '0;
    in_y0 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      foreach (in_x[n]) in_x[n] = 11'(xs[b][n]);
      in_y0 = 11'(y0s[b]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      acc_cyc[b] = cyc;
    end
    @(negedge clk);
    in_valid = 0;
  end

  always @(posedge clk) if (rst_n && t_valid) begin
    int b;
    b = nres / 2;
    checks++;
    if (t_odd != nres[0]) begin failures++; $display("FAIL result %0d: wrong pass flag", nres); end
    checks++;
    if (cyc - acc_cyc[b] != 16 * (nres % 2 + 1) + 1) begin
      failures++; $display("FAIL result %0d: at %0d cycles", nres, cyc - acc_cyc[b]);
    end
    for (int j = 0; j < 3; j++) begin
      int k;
      longint t;
      k = nres[0] ? KO[j] : KE[j];
      t = 0;
      for (int n = 1; n < 7; n++) t += longint'(xs[b][n]) * rnd(16384.0 * $cos(3.14159265358979 * n * k / 7.0));
      checks++;
      if (longint'(t_out[j]) != t) begin
        failures++; $display("FAIL block %0d T(%0d): %0d vs %0d", b, k, t_out[j], t);
      end
    end
    checks += 2;
    if (t_x0 != 11'(xs[b][0])) failures++;
    if (t_y0 != 11'(y0s[b])) failures++;
    nres++;
    if (nres == 2 * NB) begin
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
