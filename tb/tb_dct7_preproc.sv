// tb_dct7_preproc: checks the 7-point DCT input stage. Random 8-bit blocks
// y(0..6) arrive with random input gaps and random output stalls. Each
// released block must carry the recursion of the document, x(6) = y(6),
// x(n) = y(n) - x(n+1), and Y(0) = sum y(n). Blocks must come out in order
// and none may be lost or repeated.
module tb_dct7_preproc;
  localparam int NB = 40;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [7:0]  in_data = '0;
  logic signed [10:0] out_x [7];
  logic signed [10:0] out_y0;

  dct7_preproc #(.IN_W(8)) dut (.*);

  always #5 clk = ~clk;

  int ys [NB][7];
  int nout = 0;

  initial begin
    foreach (ys[b, n]) ys[b][n] = (b == 0) ? -128 : (b == 1) ? 127 : int'($urandom % 256) - 128;
  end

  // Source: one sample per accepted cycle, random gaps.
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < 7; n++) begin
        @(negedge clk);
        while ($urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = 8'(ys[b][n]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    @(negedge clk);
    in_valid = 0;
  end

  // Sink with random stalls.
  always @(negedge clk) out_ready = ($urandom % 4 != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int x [7];
    int s;
    x[6] = ys[nout][6];
    for (int n = 5; n >= 0; n--) x[n] = ys[nout][n] - x[n+1];
    s = 0;
    for (int n = 0; n < 7; n++) s += ys[nout][n];
    for (int n = 0; n < 7; n++) begin
      checks++;
      if (out_x[n] != 11'(x[n])) begin
        failures++; $display("FAIL block %0d x(%0d): %0d vs %0d", nout, n, out_x[n], x[n]);
      end
    end
    checks++;
    if (out_y0 != 11'(s)) begin failures++; $display("FAIL block %0d Y0", nout); end
    nout++;
    if (nout == NB) begin
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
