// tb_gda_accumulator: checks the MSB-first shift-accumulator bank. Random
// partial products are fed for L = 16 bit cycles (the first one being the
// sign cycle), with random hold cycles (en low) in between; the result must
// be -pp_0 * 2^15 + sum_{q>=1} pp_q * 2^(15-q) for every lane, and must not
// move while en is low.
module tb_gda_accumulator;
  localparam int L = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic signed [15:0] pp [3];
  logic signed [31:0] acc [3];

  gda_accumulator #(.N(3), .W(16), .AW(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    longint e [3];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      foreach (e[k]) e[k] = 0;
      for (int q = 0; q < L; q++) begin
        @(negedge clk);
        en = 1; first = (q == 0);
        foreach (pp[k]) pp[k] = 16'($urandom);
        foreach (e[k]) e[k] = (q == 0) ? -longint'(pp[k]) : 2 * e[k] + pp[k];
        @(posedge clk);
        if ($urandom % 4 == 0) begin
          @(negedge clk);
          en = 0;
          foreach (pp[k]) pp[k] = 16'($urandom);
          @(posedge clk);
        end
      end
      @(negedge clk);
      en = 0;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (longint'(acc[k]) != e[k]) begin
          failures++;
          $display("FAIL word %0d lane %0d: %0d vs %0d", t, k, acc[k], e[k]);
        end
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
