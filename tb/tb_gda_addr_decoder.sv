// tb_gda_addr_decoder: exhaustive check of the GDA group address decoder
// for N = 3, 5 and 7 (the 7-point DCT, 11-point DFT/DHT and 29-point DHT
// sizes). For every address the testbench works out on its own the seed
// (smallest rotation), the group number (rank of the seed among all seeds)
// and the smallest rotating factor, and compares. It also checks the
// number of groups against the document's table: G(3)=4, G(5)=8, G(7)=20.
module tb_gda_addr_decoder;
  int checks = 0, failures = 0;

  logic [2:0] a3; logic [1:0] g3; logic [1:0] r3;
  logic [4:0] a5; logic [2:0] g5; logic [2:0] r5;
  logic [6:0] a7; logic [4:0] g7; logic [2:0] r7;

  gda_addr_decoder #(.N(3)) u3 (.addr(a3), .group(g3), .rot(r3));
  gda_addr_decoder #(.N(5)) u5 (.addr(a5), .group(g5), .rot(r5));
  gda_addr_decoder #(.N(7)) u7 (.addr(a7), .group(g7), .rot(r7));

  function automatic int rl(input int v, input int n, input int r);
    return ((v << r) | (v >> (n - r))) & ((1 << n) - 1);
  endfunction
  function automatic int smin(input int v, input int n);
    int m = v;
    for (int r = 1; r < n; r++) if (rl(v, n, r) < m) m = rl(v, n, r);
    return m;
  endfunction
  function automatic int rank(input int s, input int n);
    int c = 0;
    for (int a = 0; a < s; a++) if (smin(a, n) == a) c++;
    return c;
  endfunction
  function automatic int rmin(input int v, input int n);
    for (int r = 0; r < n; r++) if (rl(smin(v, n), n, r) == v) return r;
    return -1;
  endfunction

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", w, got, exp); end
  endtask

  initial begin
    int maxg;
    maxg = 0;
    for (int a = 0; a < 8; a++) begin
      a3 = 3'(a); #1;
      chk($sformatf("N3 a%0d group", a), g3, rank(smin(a, 3), 3));
      chk($sformatf("N3 a%0d rot", a), r3, rmin(a, 3));
      if (g3 > maxg) maxg = g3;
    end
    chk("G(3)", maxg + 1, 4);
    maxg = 0;
    for (int a = 0; a < 32; a++) begin
      a5 = 5'(a); #1;
      chk($sformatf("N5 a%0d group", a), g5, rank(smin(a, 5), 5));
      chk($sformatf("N5 a%0d rot", a), r5, rmin(a, 5));
      if (g5 > maxg) maxg = g5;
    end
    chk("G(5)", maxg + 1, 8);
    maxg = 0;
    for (int a = 0; a < 128; a++) begin
      a7 = 7'(a); #1;
      chk($sformatf("N7 a%0d group", a), g7, rank(smin(a, 7), 7));
      chk($sformatf("N7 a%0d rot", a), r7, rmin(a, 7));
      if (g7 > maxg) maxg = g7;
    end
    chk("G(7)", maxg + 1, 20);
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
