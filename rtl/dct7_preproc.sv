// dct7_preproc: input buffer and pre-processing of the 7-point DCT.
//
// Collects seven input samples y(0)..y(6) and turns them into the indirect
// sequence the cyclic-convolution kernel needs:
//     x(6) = y(6),  x(n) = y(n) - x(n+1)  for n = 5..0,
// and also forms the DC output Y(0) = sum of y(n).
//
// It is a bidirectional shift register of seven words plus one accumulator.
// Load phase (7 cycles): samples shift in at word 0, so word 0 ends up
// holding y(6). Reverse phase (7 cycles): the register shifts the other way;
// each cycle the word leaving at position 0, y(n), minus the accumulator
// x(n+1) gives x(n), which is kept in the accumulator and shifted in at
// word 6. After the 14th cycle word i holds x(6-i), so the register reads
// x(6)..x(0) from word 0 to word 6, and a finished block is offered
// downstream with a valid/ready handshake (held until taken).
//
// Interface: samples enter on in_valid/in_ready (one per cycle at most);
// in_ready is low during the reverse phase and while a finished block
// waits. The 14-cycle fill latency follows the document's timing of the
// input buffer; the handshakes and the reset are this design's own.
module dct7_preproc #(
  parameter int unsigned IN_W = 8,          // input sample width (signed)
  parameter int unsigned XW   = IN_W + 3    // width of x(n) and Y(0)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic signed [XW-1:0]   out_x [7],   // out_x[n] = x(n)
  output logic signed [XW-1:0]   out_y0       // Y(0)
);

  typedef enum logic [1:0] {S_LOAD, S_REV, S_HOLD} state_e;

  state_e              state;
  logic [2:0]          cnt;
  logic signed [XW-1:0] sr [7];
  logic signed [XW-1:0] xacc;
  logic signed [XW-1:0] y0acc;
  logic signed [XW-1:0] xnew;

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_HOLD);
  assign xnew      = sr[0] - xacc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      xacc  <= '0;
      y0acc <= '0;
      for (int i = 0; i < 7; i++) sr[i] <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          sr[0] <= XW'(in_data);
          for (int i = 1; i < 7; i++) sr[i] <= sr[i-1];
          y0acc <= (cnt == 3'd0) ? XW'(in_data) : y0acc + XW'(in_data);
          if (cnt == 3'd6) begin
            cnt   <= '0;
            xacc  <= '0;
            state <= S_REV;
          end else begin
            cnt <= cnt + 3'd1;
          end
        end
        S_REV: begin
          for (int i = 0; i < 6; i++) sr[i] <= sr[i+1];
          sr[6] <= xnew;
          xacc  <= xnew;
          if (cnt == 3'd6) begin
            cnt   <= '0;
            state <= S_HOLD;
          end else begin
            cnt <= cnt + 3'd1;
          end
        end
        S_HOLD: if (out_ready) state <= S_LOAD;
        default: state <= S_LOAD;
      endcase
    end
  end

  for (genvar n = 0; n < 7; n++) begin : g_out
    assign out_x[n] = sr[6-n];
  end
  assign out_y0 = y0acc;

endmodule
