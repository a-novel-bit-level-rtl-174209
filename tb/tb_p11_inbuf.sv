// tb_p11_inbuf: checks the 11-point input buffer. Random 8-bit blocks
// x(0..10) stream in with random gaps and random output stalls. Each
// released block must present the generator-2 orderings used by the DA
// stage, a = {x1, x9, x4, x3, x5} and b = {x10, x2, x7, x8, x6}, plus x(0)
// and the sum of all samples (Y(0)). No block may be lost or repeated.
module tb_p11_inbuf;
  localparam int NB = 40;
  localparam int AI [5] = '{1, 9, 4, 3, 5};
  localparam int BI [5] = '{10, 2, 7, 8, 6};
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [7:0] in_data = '0;
  logic signed [7:0] out_a [5], out_b [5], out_x0;
  logic signed [11:0] out_y0;

  p11_inbuf #(.IN_W(8)) dut (.*);

  always #5 clk = ~clk;

  int xs [NB][11];
  int nout = 0;

  initial begin
    foreach (xs[b, n]) xs[b][n] = (b == 0) ? -128 : (b == 1) ? 127 : int'($urandom % 256) - 128;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < 11; n++) begin
        @(negedge clk);
        while (b > 20 && $urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = 8'(xs[b][n]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    @(negedge clk);
    in_valid = 0;
  end

  // Always ready for the first half (continuous stream), then random stalls.
  always @(negedge clk) out_ready = (nout < 20) || ($urandom % 4 != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int s;
    s = 0;
    for (int n = 0; n < 11; n++) s += xs[nout][n];
    for (int i = 0; i < 5; i++) begin
      checks += 2;
      if (out_a[i] != 8'(xs[nout][AI[i]])) begin failures++; $display("FAIL block %0d a[%0d]", nout, i); end
      if (out_b[i] != 8'(xs[nout][BI[i]])) begin failures++; $display("FAIL block %0d b[%0d]", nout, i); end
    end
    checks += 2;
    if (out_x0 != 8'(xs[nout][0])) begin failures++; $display("FAIL block %0d x0", nout); end
    if (out_y0 != 12'(s)) begin failures++; $display("FAIL block %0d y0", nout); end
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
