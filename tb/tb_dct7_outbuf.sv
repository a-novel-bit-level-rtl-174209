// tb_dct7_outbuf: checks the 7-point DCT output reorder buffer. Even
// triples (Y(2), Y(6), Y(4)) and odd triples (Y(5), Y(1), Y(3)) with Y(0)
// arrive 16 cycles apart, as the kernel produces them. After each odd
// triple the buffer must stream Y(0)..Y(6) in natural order on seven
// consecutive cycles, starting the cycle after the odd triple.
module tb_dct7_outbuf;
  localparam int NB = 30;
  localparam int KE [3] = '{2, 6, 4};
  localparam int KO [3] = '{5, 1, 3};
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic y_valid = 0, y_odd = 0;
  logic signed [17:0] y_out [3];
  logic signed [17:0] y_y0;
  logic out_valid;
  logic [2:0] out_index;
  logic signed [17:0] out_data;

  dct7_outbuf #(.OUT_W(18)) dut (.*);

  always #5 clk = ~clk;

  int val [NB][7];
  int odd_cyc [NB];
  int cyc = 0, nout = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    foreach (val[b, k]) val[b][k] = int'($urandom % 262144) - 131072;
    foreach (y_out[j]) y_out[j] = '0;
    y_y0 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NB; b++) begin
      for (int p = 0; p < 2; p++) begin
        @(negedge clk);
        y_valid = 1; y_odd = p[0];
        for (int j = 0; j < 3; j++) y_out[j] = 18'(val[b][p ? KO[j] : KE[j]]);
        y_y0 = p ? 18'(val[b][0]) : 18'($urandom);
        @(posedge clk);
        if (p) odd_cyc[b] = cyc;
        @(negedge clk);
        y_valid = 0;
        repeat (14) @(negedge clk);
      end
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int b, k;
    b = nout / 7;
    k = nout % 7;
    checks++;
    if (out_index != 3'(k) || out_data != 18'(val[b][k]) || cyc - odd_cyc[b] != k + 1) begin
      failures++;
      $display("FAIL block %0d word %0d: idx %0d data %0d at +%0d", b, k, out_index, out_data, cyc - odd_cyc[b]);
    end
    nout++;
    if (nout == 7 * NB) begin
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
