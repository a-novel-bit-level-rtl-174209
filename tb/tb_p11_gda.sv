// tb_p11_gda: self-checking testbench of the 11-point GDA DFT and DHT.
//
// Feeds the same stream of random 8-bit blocks (plus extreme blocks) to a
// DFT instance and a DHT instance of p11_gda and checks every output:
//   * bit-exactly against the transforms evaluated here from their
//     definitions with the same Q12 rounding of each cosine and sine, and
//   * against the real-valued transforms within a small tolerance.
// Also checks the sustained rate (a block every 11 cycles) and the latency
// from the last sample of a block to its first output word.
module tb_p11_gda;
  localparam int NBLK = 40;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic in_valid, rdy_dft, rdy_dht;
  logic signed [7:0] in_data;
  logic ov_dft, ov_dht;
  logic [3:0] oi_dft, oi_dht;
  logic signed [15:0] ore_dft, oim_dft, ore_dht, oim_dht;

  int checks = 0, failures = 0;

  p11_gda #(.XFORM(gda_pkg::XFORM_DFT)) u_dft (
    .clk, .rst_n, .in_valid(in_valid && rdy_dht), .in_ready(rdy_dft), .in_data,
    .out_valid(ov_dft), .out_index(oi_dft), .out_re(ore_dft), .out_im(oim_dft));
  p11_gda #(.XFORM(gda_pkg::XFORM_DHT)) u_dht (
    .clk, .rst_n, .in_valid(in_valid && rdy_dft), .in_ready(rdy_dht), .in_data,
    .out_valid(ov_dht), .out_index(oi_dht), .out_re(ore_dht), .out_im(oim_dht));

  always #5 clk = ~clk;

  int xs [NBLK][11];
  longint ere [NBLK][11], eim [NBLK][11], eh [NBLK][11];
  real    rre [NBLK][11], rim [NBLK][11], rh [NBLK][11];

  function automatic int rnd(input real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int n = 0; n < 11; n++) begin
        if (b == 0)      xs[b][n] = 127;
        else if (b == 1) xs[b][n] = -128;
        else if (b == 2) xs[b][n] = (n % 2) ? -128 : 127;
        else             xs[b][n] = $signed(8'($urandom));
      end
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < 11; k++) begin
        longint cr, ci;
        real fr, fi;
        cr = 0; ci = 0; fr = 0.0; fi = 0.0;
        for (int n = 0; n < 11; n++) begin
          real ang;
          ang = 2.0 * PI * ((n * k) % 11) / 11.0;
          cr += longint'(xs[b][n]) * rnd(4096.0 * $cos(ang));
          ci -= longint'(xs[b][n]) * rnd(4096.0 * $sin(ang));
          fr += xs[b][n] * $cos(ang);
          fi -= xs[b][n] * $sin(ang);
        end
        ere[b][k] = cr >>> 8;
        eim[b][k] = ci >>> 8;
        eh[b][k]  = (cr - ci) >>> 8;
        rre[b][k] = fr; rim[b][k] = fi; rh[b][k] = fr - fi;
      end
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int sidx = 0;
  int last_cyc [NBLK];
  assign in_valid = rst_n && (sidx < NBLK * 11);
  assign in_data  = (sidx < NBLK * 11) ? 8'(xs[sidx / 11][sidx % 11]) : '0;
  always @(posedge clk)
    if (in_valid && rdy_dft && rdy_dht) begin
      if (sidx % 11 == 10) last_cyc[sidx / 11] = cyc;
      sidx <= sidx + 1;
    end

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic chk_r(input string what, input real got, input real exp);
    checks++;
    if (got - exp > 0.5 || exp - got > 0.5) begin
      failures++;
      $display("FAIL %s: got %f real %f", what, got, exp);
    end
  endtask

  int db = 0, dw = 0, hb = 0, hw = 0;
  int first_cyc [NBLK];
  always @(posedge clk) begin
    if (rst_n && ov_dft) begin
      chk($sformatf("dft idx b%0d", db), oi_dft, dw);
      chk($sformatf("dft re b%0d k%0d", db, dw), ore_dft, ere[db][dw]);
      chk($sformatf("dft im b%0d k%0d", db, dw), oim_dft, eim[db][dw]);
      chk_r($sformatf("dft re b%0d k%0d", db, dw), ore_dft / 16.0, rre[db][dw]);
      chk_r($sformatf("dft im b%0d k%0d", db, dw), oim_dft / 16.0, rim[db][dw]);
      if (dw == 0) first_cyc[db] = cyc;
      if (dw == 10) begin dw = 0; db++; end else dw++;
    end
    if (rst_n && ov_dht) begin
      chk($sformatf("dht idx b%0d", hb), oi_dht, hw);
      chk($sformatf("dht b%0d k%0d", hb, hw), ore_dht, eh[hb][hw]);
      chk($sformatf("dht im b%0d", hb), oim_dht, 0);
      chk_r($sformatf("dht b%0d k%0d", hb, hw), ore_dht / 16.0, rh[hb][hw]);
      if (hw == 10) begin hw = 0; hb++; end else hw++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (db == NBLK && hb == NBLK);
    repeat (3) @(posedge clk);
    for (int b = 2; b < NBLK; b++)
      chk($sformatf("period b%0d", b), first_cyc[b] - first_cyc[b-1], 11);
    chk("latency", first_cyc[0] - last_cyc[0], 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 11 + 300) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
