// tb_dct7_gda: self-checking testbench of the 7-point GDA DCT.
//
// Streams random 8-bit blocks (plus an all-maximum and an all-minimum block)
// back to back into dct7_gda and checks every output word twice:
//   * bit-exactly against a model written here from the DCT formula with the
//     same fixed-point rules (Q14 cosines, floor to OUT_FRAC bits), and
//   * against the real-valued DCT within one output LSB plus the coefficient
//     rounding error.
// It also checks the timing the design promises: a new block every 32
// cycles when inputs are always available, and a fixed latency from the
// last sample of a block to its Y(0).
module tb_dct7_gda;
  localparam int NBLK     = 40;
  localparam int OUT_FRAC = 6;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic signed [7:0] in_data;
  logic out_valid;
  logic [2:0] out_index;
  logic signed [17:0] out_data;

  int checks = 0, failures = 0;

  dct7_gda dut (.*);

  always #5 clk = ~clk;

  // Stimulus blocks and reference results.
  int ysamp [NBLK][7];
  longint exp_q [NBLK][7];
  real    exp_r [NBLK][7];

  function automatic int rnd(input real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  function automatic longint floor_div(input longint a, input int sh);
    return a >>> sh;
  endfunction

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      for (int n = 0; n < 7; n++) begin
        if (b == 0)      ysamp[b][n] = 127;
        else if (b == 1) ysamp[b][n] = -128;
        else if (b == 2) ysamp[b][n] = (n % 2) ? -128 : 127;
        else             ysamp[b][n] = $signed(8'($urandom));
      end
    end
    for (int b = 0; b < NBLK; b++) begin
      int x[7];
      int y0;
      x[6] = ysamp[b][6];
      for (int n = 5; n >= 0; n--) x[n] = ysamp[b][n] - x[n+1];
      y0 = 0;
      for (int n = 0; n < 7; n++) y0 += ysamp[b][n];
      exp_q[b][0] = longint'(y0) <<< OUT_FRAC;
      exp_r[b][0] = y0;
      for (int k = 1; k < 7; k++) begin
        longint t, z;
        real yr;
        t = 0;
        for (int n = 1; n < 7; n++)
          t += longint'(x[n]) * rnd(16384.0 * $cos(3.14159265358979 * n * k / 7.0));
        z = 2 * t + longint'(x[0]) * 16384;
        exp_q[b][k] = floor_div(z * rnd(16384.0 * $cos(3.14159265358979 * k / 14.0)), 28 - OUT_FRAC);
        yr = 0.0;
        for (int n = 0; n < 7; n++)
          yr += ysamp[b][n] * $cos(3.14159265358979 * (2 * n + 1) * k / 14.0);
        exp_r[b][k] = yr;
      end
    end
  end

  // Drive: always valid, samples in order.
  int sidx = 0;
  int last_sample_cycle [NBLK];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  assign in_valid = rst_n && (sidx < NBLK * 7);
  assign in_data  = (sidx < NBLK * 7) ? 8'(ysamp[sidx / 7][sidx % 7]) : '0;

  always @(posedge clk) begin
    if (in_valid && in_ready) begin
      if (sidx % 7 == 6) last_sample_cycle[sidx / 7] = cyc;
      sidx <= sidx + 1;
    end
  end

  // Check outputs.
  int oblk = 0, oword = 0;
  int y0_cycle [NBLK];
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real err;
      checks++;
      if (out_index != 3'(oword)) begin
        failures++;
        $display("FAIL index: block %0d got %0d exp %0d", oblk, out_index, oword);
      end
      checks++;
      if (longint'(out_data) != exp_q[oblk][oword]) begin
        failures++;
        $display("FAIL block %0d Y(%0d): got %0d exp %0d", oblk, oword, out_data, exp_q[oblk][oword]);
      end
      err = real'(out_data) / 64.0 - exp_r[oblk][oword];
      checks++;
      if (err > 1.5 || err < -1.5) begin
        failures++;
        $display("FAIL block %0d Y(%0d): %f vs real %f", oblk, oword, real'(out_data) / 64.0, exp_r[oblk][oword]);
      end
      if (oword == 0) y0_cycle[oblk] = cyc;
      if (oword == 6) begin
        oword = 0;
        oblk++;
      end else oword++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (oblk == NBLK);
    repeat (5) @(posedge clk);
    // Rate: 32 cycles per block once the pipeline is full.
    for (int b = 2; b < NBLK; b++) begin
      checks++;
      if (y0_cycle[b] - y0_cycle[b-1] != 32) begin
        failures++;
        $display("FAIL rate: block %0d period %0d", b, y0_cycle[b] - y0_cycle[b-1]);
      end
    end
    // Latency of the first block: last sample to Y(0).
    checks++;
    if (y0_cycle[0] - last_sample_cycle[0] != 59) begin
      failures++;
      $display("FAIL latency: %0d cycles", y0_cycle[0] - last_sample_cycle[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 40 + 500) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d blocks out", oblk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
