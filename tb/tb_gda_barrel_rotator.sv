// tb_gda_barrel_rotator: checks the logarithmic word rotator for N = 3, 5
// and 7 with random words and every rotate amount: dout[k] must equal
// din[(k + rot) mod N].
module tb_gda_barrel_rotator;
  int checks = 0, failures = 0;

  logic signed [15:0] i3 [3], o3 [3]; logic [1:0] r3;
  logic signed [15:0] i5 [5], o5 [5]; logic [2:0] r5;
  logic signed [15:0] i7 [7], o7 [7]; logic [2:0] r7;

  gda_barrel_rotator #(.N(3), .W(16)) u3 (.din(i3), .rot(r3), .dout(o3));
  gda_barrel_rotator #(.N(5), .W(16)) u5 (.din(i5), .rot(r5), .dout(o5));
  gda_barrel_rotator #(.N(7), .W(16)) u7 (.din(i7), .rot(r7), .dout(o7));

  initial begin
    for (int t = 0; t < 20; t++) begin
      foreach (i3[k]) i3[k] = 16'($urandom);
      foreach (i5[k]) i5[k] = 16'($urandom);
      foreach (i7[k]) i7[k] = 16'($urandom);
      for (int r = 0; r < 7; r++) begin
        r3 = 2'(r % 3); r5 = 3'(r % 5); r7 = 3'(r); #1;
        for (int k = 0; k < 3; k++) begin checks++; if (o3[k] != i3[(k + r % 3) % 3]) failures++; end
        for (int k = 0; k < 5; k++) begin checks++; if (o5[k] != i5[(k + r % 5) % 5]) failures++; end
        for (int k = 0; k < 7; k++) begin checks++; if (o7[k] != i7[(k + r) % 7]) failures++; end
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
