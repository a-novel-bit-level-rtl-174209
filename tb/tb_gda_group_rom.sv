// tb_gda_group_rom: checks every row of the GDA group memory for the 3-word
// DCT memory and the 5-word cosine memory. The expected word k of group g
// is computed here from the g-th seed: sum over n of seed[(n-k) mod N] * c_n.
module tb_gda_group_rom;
  int checks = 0, failures = 0;
  localparam int C3 [3] = '{10215, -14761, -3646};
  localparam int C5 [5] = '{3446, 1702, -2682, -583, -3930};

  logic [1:0] grp3; logic signed [15:0] row3 [3];
  logic [2:0] grp5; logic signed [15:0] row5 [5];

  gda_group_rom #(.N(3), .W(16), .COEF(C3)) u3 (.group(grp3), .row(row3));
  gda_group_rom #(.N(5), .W(16), .COEF(C5)) u5 (.group(grp5), .row(row5));

  function automatic int rl(input int v, input int n, input int r);
    return ((v << r) | (v >> (n - r))) & ((1 << n) - 1);
  endfunction
  function automatic bit is_seed(input int v, input int n);
    for (int r = 1; r < n; r++) if (rl(v, n, r) < v) return 0;
    return 1;
  endfunction
  function automatic int nth_seed(input int g, input int n);
    int c = 0;
    for (int a = 0; a < (1 << n); a++) if (is_seed(a, n)) begin
      if (c == g) return a;
      c++;
    end
    return -1;
  endfunction

  initial begin
    for (int g = 0; g < 4; g++) begin
      int s;
      grp3 = 2'(g); #1;
      s = nth_seed(g, 3);
      for (int k = 0; k < 3; k++) begin
        int e;
        e = 0;
        for (int n = 0; n < 3; n++) if ((s >> ((n - k + 3) % 3)) & 1) e += C3[n];
        checks++;
        if (row3[k] != 16'(e)) begin failures++; $display("FAIL N3 g%0d k%0d: %0d vs %0d", g, k, row3[k], e); end
      end
    end
    for (int g = 0; g < 8; g++) begin
      int s;
      grp5 = 3'(g); #1;
      s = nth_seed(g, 5);
      for (int k = 0; k < 5; k++) begin
        int e;
        e = 0;
        for (int n = 0; n < 5; n++) if ((s >> ((n - k + 5) % 5)) & 1) e += C5[n];
        checks++;
        if (row5[k] != 16'(e)) begin failures++; $display("FAIL N5 g%0d k%0d: %0d vs %0d", g, k, row5[k], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
