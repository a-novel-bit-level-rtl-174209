// dht29_gda: 1-D 29-point discrete Hartley transform on four 7-point GDA
// lookups, working through the transform in four iterations.
//
// H(k) = sum_n x(n) cas(2 pi n k / 29), cas = cos + sin, for k = 0..28.
// H(0) is the plain sum. With the generator g = 2 the other outputs are
// H(2^i) = x(0) + T(2^i), where T is the 28-point cyclic convolution
// T(2^i) = sum_j x(2^(j-i)) * cas(2 pi 2^j / 29). This follows the
// document: Agarwal-Cooley splitting 28 = 4 x 7 (position j goes to block
// j mod 4, word j mod 7) turns it into a 4 x 4 block-circulant matrix of
// 7-point cyclic convolutions. Output block i is the sum, over the four
// coefficient blocks a, of the 7-point convolution of coefficient block a
// with input block (a - i) mod 4. The four input blocks are
//   {x1, x24, x25, x20, x16, x7, x23}, {x17, x2, x19, x21, x11, x3, x14},
//   {x28, x5, x4, x9, x13, x22, x6},   {x12, x27, x10, x8, x18, x26, x15}.
// Four GDA lookups share one 7-bit decoder design (20 groups). Lookup a
// holds coefficient block a. The input blocks are rotated between the
// iterations, so four iterations of L bit cycles produce all 28 outputs.
//
// The datapath adds the four lookups' partial products before one
// accumulator bank. That is the same as adding the four convolutions, by
// linearity, and needs one bank instead of four. This, the word widths,
// the handshakes and the output buffer are this design's own choices.
//
// Pipeline: a 29-word input shift register fills while the DA stage works
// on the previous block. The DA stage takes 4 x L cycles per block
// (32 cycles at L = IN_W = 8). Its output block i is written to a
// collection bank at indices 2^j mod 29. The last block goes straight,
// with x(0) added, into a drain register that streams H(0)..H(28), one
// per clock. Sustained rate: one block per 32 clocks. Latency: H(0) leaves
// on the 35th clock after the clock that takes the block's last sample
// when the DA stage is free (see the testbench).
//
// Interface: samples x(0)..x(28) on in_valid/in_ready. Results on out_valid
// with out_index = k and out_data = H(k) * 2^OUT_FRAC (floor), with no
// back-pressure. Coefficients are Q12 (gda_pkg::DHT29_C0..C3).
module dht29_gda #(
  parameter int unsigned IN_W     = 8,   // input sample width = DA word length
  parameter int unsigned W        = 16,  // group memory word width
  parameter int unsigned OUT_W    = 16,
  parameter int unsigned OUT_FRAC = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic [4:0]              out_index,
  output logic signed [OUT_W-1:0] out_data
);
  import gda_pkg::*;

  localparam int unsigned L  = IN_W;
  localparam int unsigned SW = IN_W + 5;           // sum of 29 samples
  localparam int unsigned PW = W + 2;              // sum of four lookups
  localparam int unsigned AW = PW + L;             // accumulator width
  localparam int unsigned VW = AW + 1;
  localparam int unsigned FR = DHT29_COEF_FRAC;
  localparam int unsigned SH = FR - OUT_FRAC;
  localparam int unsigned GW = $clog2(num_groups(7));
  localparam int unsigned RW = 3;

  // ---------------- input buffer ----------------
  logic signed [IN_W-1:0] sr [29];    // sr[28 - n] = x(n) once full
  logic signed [SW-1:0]   sum;
  logic [4:0]             icnt;
  logic                   full, take;
  logic signed [IN_W-1:0] blk_in [4][7];

  assign in_ready = !full || take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      icnt <= '0;
      sum  <= '0;
      for (int i = 0; i < 29; i++) sr[i] <= '0;
    end else begin
      if (take) full <= 1'b0;
      if (in_valid && in_ready) begin
        sr[0] <= in_data;
        for (int i = 1; i < 29; i++) sr[i] <= sr[i-1];
        sum <= (icnt == 5'd0) ? SW'(in_data) : sum + SW'(in_data);
        if (icnt == 5'd28) begin
          icnt <= '0;
          full <= 1'b1;
        end else begin
          icnt <= icnt + 5'd1;
        end
      end
    end
  end

  for (genvar a = 0; a < 4; a++) begin : g_blk
    for (genvar b = 0; b < 7; b++) begin : g_word
      assign blk_in[a][b] = sr[28 - DHT29_MAP[7*a + b]];
    end
  end

  // ---------------- DA stage ----------------
  logic                   busy, last, core_ready;
  logic [1:0]             it;
  logic [$clog2(L)-1:0]   bc;
  logic signed [IN_W-1:0] hold [4][7];
  logic [L-1:0]           ps [4][7];
  logic signed [IN_W-1:0] hx0;
  logic signed [SW-1:0]   hsum;

  assign last       = busy && (bc == ($clog2(L))'(L - 1));
  assign core_ready = !busy || (last && it == 2'd3);
  assign take       = full && core_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      it   <= '0;
      bc   <= '0;
      hx0  <= '0;
      hsum <= '0;
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 7; b++) begin
          hold[a][b] <= '0;
          ps[a][b]   <= '0;
        end
    end else begin
      if (busy) begin
        for (int a = 0; a < 4; a++)
          for (int b = 0; b < 7; b++) ps[a][b] <= ps[a][b] << 1;
        bc <= bc + 1'b1;
        if (last) begin
          bc <= '0;
          if (it == 2'd3) begin
            busy <= 1'b0;
          end else begin
            it <= it + 2'd1;
            // Next iteration: lookup a sees input block (a - it - 1) mod 4.
            for (int a = 0; a < 4; a++)
              for (int b = 0; b < 7; b++) ps[a][b] <= hold[2'(a - int'(it) - 1)][b];
          end
        end
      end
      if (take) begin
        busy <= 1'b1;
        it   <= '0;
        bc   <= '0;
        hx0  <= sr[28];
        hsum <= sum;
        for (int a = 0; a < 4; a++)
          for (int b = 0; b < 7; b++) begin
            hold[a][b] <= blk_in[a][b];
            ps[a][b]   <= blk_in[a][b];
          end
      end
    end
  end

  logic [6:0]          addr  [4];
  logic [GW-1:0]       group [4];
  logic [RW-1:0]       rot   [4];
  logic signed [W-1:0] pp    [4][7];
  logic signed [PW-1:0] ppsum [7];
  logic signed [AW-1:0] acc   [7];

  for (genvar a = 0; a < 4; a++) begin : g_gdau
    for (genvar b = 0; b < 7; b++) begin : g_bit
      assign addr[a][b] = ps[a][b][L-1];
    end
    gda_addr_decoder #(.N(7), .GW(GW), .RW(RW)) u_dec (
      .addr(addr[a]), .group(group[a]), .rot(rot[a])
    );
    if (a == 0) begin : g_c
      gda_lookup #(.N(7), .W(W), .COEF(DHT29_C0), .GW(GW), .RW(RW)) u_lookup (
        .group(group[a]), .rot(rot[a]), .pp(pp[a])
      );
    end else if (a == 1) begin : g_c
      gda_lookup #(.N(7), .W(W), .COEF(DHT29_C1), .GW(GW), .RW(RW)) u_lookup (
        .group(group[a]), .rot(rot[a]), .pp(pp[a])
      );
    end else if (a == 2) begin : g_c
      gda_lookup #(.N(7), .W(W), .COEF(DHT29_C2), .GW(GW), .RW(RW)) u_lookup (
        .group(group[a]), .rot(rot[a]), .pp(pp[a])
      );
    end else if (a == 3) begin : g_c
      gda_lookup #(.N(7), .W(W), .COEF(DHT29_C3), .GW(GW), .RW(RW)) u_lookup (
        .group(group[a]), .rot(rot[a]), .pp(pp[a])
      );
    end
  end

  always_comb begin
    for (int b = 0; b < 7; b++)
      ppsum[b] = PW'(pp[0][b]) + PW'(pp[1][b]) + PW'(pp[2][b]) + PW'(pp[3][b]);
  end

  gda_accumulator #(.N(7), .W(PW), .AW(AW)) u_acc (
    .clk, .rst_n, .en(busy), .first(bc == '0), .pp(ppsum), .acc(acc)
  );

  // ---------------- output buffer ----------------
  logic                    res_valid;
  logic [1:0]              res_it;
  logic signed [IN_W-1:0]  rx0;
  logic signed [SW-1:0]    rsum;
  logic signed [AW-1:0]    coll [29];
  logic signed [AW-1:0]    tv   [29];
  logic signed [OUT_W-1:0] drain [29];
  logic [4:0]              dcnt;
  logic                    draining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_it    <= '0;
      rx0       <= '0;
      rsum      <= '0;
    end else begin
      res_valid <= last;
      if (last) res_it <= it;
      if (last && it == 2'd3) begin
        rx0  <= hx0;
        rsum <= hsum;
      end
    end
  end

  // The final iteration's results go straight to the drain register.
  always_comb begin
    for (int k = 0; k < 29; k++) tv[k] = coll[k];
    for (int b = 0; b < 7; b++) tv[DHT29_MAP[21 + b]] = acc[b];
  end

  assign out_valid = draining;
  assign out_index = dcnt;
  assign out_data  = drain[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      draining <= 1'b0;
      dcnt     <= '0;
      for (int k = 0; k < 29; k++) begin
        coll[k]  <= '0;
        drain[k] <= '0;
      end
    end else begin
      if (draining) begin
        for (int k = 0; k < 28; k++) drain[k] <= drain[k+1];
        dcnt <= dcnt + 5'd1;
        if (dcnt == 5'd28) draining <= 1'b0;
      end
      if (res_valid) begin
        for (int a = 0; a < 3; a++)
          if (res_it == 2'(a))
            for (int b = 0; b < 7; b++) coll[DHT29_MAP[7*a + b]] <= acc[b];
        if (res_it == 2'd3) begin
          drain[0] <= OUT_W'(VW'(rsum) <<< OUT_FRAC);
          for (int k = 1; k < 29; k++)
            drain[k] <= OUT_W'((VW'(tv[k]) + (VW'(rx0) <<< FR)) >>> SH);
          draining <= 1'b1;
          dcnt     <= '0;
        end
      end
    end
  end

endmodule
