// tb_gda_unit: checks complete GDA units. A 3-point unit with the DCT
// coefficients and a 7-point unit with random coefficients receive random
// signed 16-bit words bit-serially (MSB first); after 16 cycles output k
// must equal the cyclic convolution sum_n e_((n-k) mod N) * c_n computed
// here. Also checks that results appear exactly 16 cycles after the start.
module tb_gda_unit;
  localparam int L = 16;
  localparam int C3 [3] = '{10215, -14761, -3646};
  localparam int C7 [7] = '{1200, -3000, 777, 4095, -4096, 15, -999};
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic [2:0] addr3;
  logic [6:0] addr7;
  logic signed [31:0] acc3 [3];
  logic signed [31:0] acc7 [7];

  gda_unit #(.N(3), .W(16), .AW(32), .COEF(C3)) u3 (.clk, .rst_n, .en, .first, .addr(addr3), .acc(acc3));
  gda_unit #(.N(7), .W(16), .AW(32), .COEF(C7)) u7 (.clk, .rst_n, .en, .first, .addr(addr7), .acc(acc7));

  always #5 clk = ~clk;

  initial begin
    logic signed [15:0] e3 [3];
    logic signed [15:0] e7 [7];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      foreach (e3[i]) e3[i] = (t == 0) ? -16'sd32768 : 16'($urandom) >>> ($urandom % 8);
      foreach (e7[i]) e7[i] = (t == 1) ? 16'sd32767 : 16'($urandom) >>> ($urandom % 8);
      for (int q = L - 1; q >= 0; q--) begin
        @(negedge clk);
        en = 1; first = (q == L - 1);
        foreach (e3[i]) addr3[i] = e3[i][q];
        foreach (e7[i]) addr7[i] = e7[i][q];
      end
      @(negedge clk);
      en = 0;
      for (int k = 0; k < 3; k++) begin
        longint s;
        s = 0;
        for (int n = 0; n < 3; n++) s += longint'(e3[(n - k + 3) % 3]) * C3[n];
        checks++;
        if (longint'(acc3[k]) != s) begin failures++; $display("FAIL N3 t%0d k%0d %0d vs %0d", t, k, acc3[k], s); end
      end
      for (int k = 0; k < 7; k++) begin
        longint s;
        s = 0;
        for (int n = 0; n < 7; n++) s += longint'(e7[(n - k + 7) % 7]) * C7[n];
        checks++;
        if (longint'(acc7[k]) != s) begin failures++; $display("FAIL N7 t%0d k%0d %0d vs %0d", t, k, acc7[k], s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
