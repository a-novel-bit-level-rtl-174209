// tb_dht29_gda: end-to-end check of the 29-point GDA-based DHT at its
// default parameters. 40 blocks of 8-bit samples (extreme blocks first,
// then random) are streamed in: back to back at first, with random idle
// cycles later. Each output is compared
//   * bit-exactly with floor((x(0)*2^12 + sum_{n>=1} x(n) * C(nk mod 29)) / 2^10),
//     C(m) = round(2^12 cas(2 pi m / 29)), i.e. the DHT definition evaluated
//     with the same coefficient rounding but without any reordering, and
//   * with the exact real-valued DHT to within 1.5.
// It also checks natural output order, a block period of 32 clocks under a
// continuous input, and a constant latency from the last sample to H(0). It
// counts the mechanisms (all 20 groups of the 7-bit decoders, non-zero
// rotations, all four iterations, input back-pressure, idle input cycles)
// and fails if one never occurs.
module tb_dht29_gda;
  localparam int NBLK = 40;
  localparam int LAT  = 35;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  logic signed [7:0]  in_data;
  logic [4:0]         out_index;
  logic signed [15:0] out_data;

  dht29_gda dut (.*);

  always #5 clk = ~clk;

  function automatic int rnd(input real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  int  xs [NBLK][29];
  int  eq [NBLK][29];
  real er [NBLK][29];

  initial begin
    int cq [29];
    for (int m = 0; m < 29; m++)
      cq[m] = rnd(4096.0 * ($cos(2.0 * 3.14159265358979 * m / 29.0) + $sin(2.0 * 3.14159265358979 * m / 29.0)));
    for (int b = 0; b < NBLK; b++)
      for (int n = 0; n < 29; n++)
        xs[b][n] = (b == 0) ? 127 : (b == 1) ? -128 : (b == 2) ? ((n % 2) ? -128 : 127) : int'($urandom % 256) - 128;
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < 29; k++) begin
        int s;
        real r;
        s = xs[b][0] * 4096;
        r = 0.0;
        for (int n = 1; n < 29; n++) s += xs[b][n] * cq[(n * k) % 29];
        for (int n = 0; n < 29; n++)
          r += xs[b][n] * ($cos(2.0 * 3.14159265358979 * n * k / 29.0) + $sin(2.0 * 3.14159265358979 * n * k / 29.0));
        if (k == 0) begin
          s = 0;
          for (int n = 0; n < 29; n++) s += xs[b][n];
          eq[b][k] = s * 4;
        end else eq[b][k] = s >>> 10;
        er[b][k] = r;
      end
  end

  // ---------------- stimulus ----------------
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int sidx = 0;
  logic gap = 0;
  int last_cyc [NBLK];
  always @(negedge clk) gap = (sidx > 12 * 29) && ($urandom % 5 == 0);
  assign in_valid = rst_n && !gap && sidx < NBLK * 29;
  assign in_data  = (sidx < NBLK * 29) ? 8'(xs[sidx / 29][sidx % 29]) : '0;
  always @(posedge clk)
    if (in_valid && in_ready) begin
      if (sidx % 29 == 28) last_cyc[sidx / 29] = cyc;
      sidx <= sidx + 1;
    end

  // ---------------- mechanism counters ----------------
  int n_rot = 0, n_bp = 0, n_gap = 0;
  bit seen_g [20];
  bit seen_it [4];
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_bp++;
    if (gap) n_gap++;
    if (dut.busy) begin
      for (int a = 0; a < 4; a++) begin
        seen_g[dut.group[a]] = 1;
        if (dut.rot[a] != 0) n_rot++;
      end
      seen_it[dut.it] = 1;
    end
  end

  // ---------------- output checker ----------------
  int ob = 0, ow = 0;
  int h0_cyc [NBLK];
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_index != 5'(ow)) begin failures++; $display("FAIL block %0d: index %0d exp %0d", ob, out_index, ow); end
    checks++;
    if (out_data != 16'(eq[ob][ow])) begin
      failures++; $display("FAIL block %0d H(%0d): %0d exp %0d", ob, ow, out_data, eq[ob][ow]);
    end
    checks++;
    if (real'(out_data) / 4.0 - er[ob][ow] > 1.5 || er[ob][ow] - real'(out_data) / 4.0 > 1.5) begin
      failures++; $display("FAIL block %0d H(%0d): %f vs real %f", ob, ow, real'(out_data) / 4.0, er[ob][ow]);
    end
    if (ow == 0) begin
      h0_cyc[ob] = cyc;
      // Blocks 1..10 arrive back to back: one block per 32 clocks.
      if (ob >= 2 && ob <= 10) begin
        checks++;
        if (h0_cyc[ob] - h0_cyc[ob-1] != 32) begin
          failures++; $display("FAIL block %0d: period %0d", ob, h0_cyc[ob] - h0_cyc[ob-1]);
        end
      end
      if (ob == 0) begin
        checks++;
        if (cyc - last_cyc[0] != LAT) begin
          failures++; $display("FAIL latency %0d, expected %0d", cyc - last_cyc[0], LAT);
        end
      end
    end
    if (ow == 28) begin ow = 0; ob++; end else ow++;
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ob == NBLK);
    for (int g = 0; g < 20; g++) need($sformatf("7-bit group %0d", g), int'(seen_g[g]));
    for (int i = 0; i < 4; i++) need($sformatf("iteration %0d", i), int'(seen_it[i]));
    need("non-zero rotation", n_rot);
    need("input back-pressure", n_bp);
    need("input idle cycles", n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 80 + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
