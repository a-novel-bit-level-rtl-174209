// tb_dct7_postproc: checks the serial output multipliers of the 7-point DCT.
// For random 8-bit blocks the testbench forms x(n), T(k) and Y(0) itself and
// drives a triple (even or odd) every 16..20 cycles. The result must be
// floor((2T(k) + x(0)*2^14) * Ck / 2^22) with Ck = round(2^14 cos(pi k/14)),
// i.e. Y(k) with 6 fraction bits, Y(0) shifted to the same format, and it
// must appear on the 17th clock edge after the triple (16 bit cycles plus
// the output register).
module tb_dct7_postproc;
  localparam int NB = 60;
  localparam int KE [3] = '{2, 6, 4};
  localparam int KO [3] = '{5, 1, 3};
  localparam int PC [7] = '{16384, 15973, 14761, 12810, 10215, 7109, 3646};
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic t_valid = 0, t_odd = 0;
  logic signed [31:0] t_out [3];
  logic signed [10:0] t_x0, t_y0;
  logic y_valid, y_odd;
  logic signed [17:0] y_out [3];
  logic signed [17:0] y_y0;

  dct7_postproc #(.XW(11), .AW(32), .OUT_W(18), .OUT_FRAC(6)) dut (.*);

  always #5 clk = ~clk;

  function automatic int rnd(input real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  longint exp_y [NB][3];
  int exp_y0 [NB];
  int exp_odd [NB];
  int drv_cyc [NB];
  int cyc = 0, nres = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    foreach (t_out[j]) t_out[j] = '0;
    t_x0 = '0; t_y0 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NB; b++) begin
      int y [7], x [7];
      longint t;
      int k;
      foreach (y[n]) y[n] = (b < 2) ? ((b == 0) ? 127 : -128) * ((n % 2) ? -1 : 1) : int'($urandom % 256) - 128;
      x[6] = y[6];
      for (int n = 5; n >= 0; n--) x[n] = y[n] - x[n+1];
      exp_odd[b] = b % 2;
      exp_y0[b] = 0;
      foreach (y[n]) exp_y0[b] += y[n];
      @(negedge clk);
      t_valid = 1; t_odd = exp_odd[b][0];
      t_x0 = 11'(x[0]); t_y0 = 11'(exp_y0[b]);
      for (int j = 0; j < 3; j++) begin
        k = exp_odd[b] ? KO[j] : KE[j];
        t = 0;
        for (int n = 1; n < 7; n++) t += longint'(x[n]) * rnd(16384.0 * $cos(3.14159265358979 * n * k / 7.0));
        t_out[j] = 32'(t);
        exp_y[b][j] = ((2 * t + longint'(x[0]) * 16384) * PC[k]) >>> 22;
      end
      @(posedge clk);
      drv_cyc[b] = cyc;
      @(negedge clk);
      t_valid = 0;
      repeat (14 + $urandom % 5) @(negedge clk);
    end
  end

  always @(posedge clk) if (rst_n && y_valid) begin
    checks++;
    if (cyc - drv_cyc[nres] != 17) begin failures++; $display("FAIL %0d: latency %0d", nres, cyc - drv_cyc[nres]); end
    checks++;
    if (y_odd != exp_odd[nres][0]) failures++;
    for (int j = 0; j < 3; j++) begin
      checks++;
      if (longint'(y_out[j]) != exp_y[nres][j]) begin
        failures++; $display("FAIL %0d lane %0d: %0d vs %0d", nres, j, y_out[j], exp_y[nres][j]);
      end
    end
    checks++;
    if (y_y0 != 18'(exp_y0[nres] * 64)) failures++;
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
