// dct7_outbuf: output buffer of the 7-point DCT.
//
// The kernel produces its outputs in the permuted order of the cyclic
// convolution (even triple Y(2), Y(6), Y(4), then odd triple Y(5), Y(1),
// Y(3)). This buffer writes each triple into its natural positions; when
// the odd triple (the last of a block) arrives, the whole block, with Y(0),
// is moved to a second register bank and shifted out one word per cycle in
// natural order Y(0)..Y(6) with out_valid and out_index. The collection
// bank then takes the next block while the previous one drains, and the
// 7-cycle drain is far shorter than the 32-cycle block period.
// The document shows an output buffer but not its insides; the double
// bank and serial natural-order output are this design's choice.
module dct7_outbuf #(
  parameter int unsigned OUT_W = 18
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    y_valid,
  input  logic                    y_odd,
  input  logic signed [OUT_W-1:0] y_out [3],
  input  logic signed [OUT_W-1:0] y_y0,
  output logic                    out_valid,
  output logic [2:0]              out_index,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int KEVEN [3] = '{2, 6, 4};
  localparam int KODD  [3] = '{5, 1, 3};

  logic signed [OUT_W-1:0] coll [7];
  logic signed [OUT_W-1:0] drain [7];
  logic [2:0]              dcnt;
  logic                    draining;

  assign out_valid = draining;
  assign out_index = dcnt;
  assign out_data  = drain[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      draining <= 1'b0;
      dcnt     <= '0;
      for (int i = 0; i < 7; i++) begin
        coll[i]  <= '0;
        drain[i] <= '0;
      end
    end else begin
      if (draining) begin
        for (int i = 0; i < 6; i++) drain[i] <= drain[i+1];
        dcnt <= dcnt + 3'd1;
        if (dcnt == 3'd6) draining <= 1'b0;
      end
      if (y_valid && !y_odd) begin
        for (int j = 0; j < 3; j++) coll[KEVEN[j]] <= y_out[j];
      end
      if (y_valid && y_odd) begin
        // Complete block: hand it to the drain bank in natural order.
        for (int i = 0; i < 7; i++) drain[i] <= coll[i];
        drain[0] <= y_y0;
        for (int j = 0; j < 3; j++) drain[KODD[j]] <= y_out[j];
        draining <= 1'b1;
        dcnt     <= '0;
      end
    end
  end

endmodule
