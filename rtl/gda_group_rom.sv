// gda_group_rom: group memory of a GDA unit.
//
// Holds one row of N partial products for each of the G(N) groups of N-bit
// DA addresses. Word k of the row of seed S is
//     sum over n of S[(n - k) mod N] * COEF[n],
// the contribution of one bit plane to output k of the cyclic convolution
// u_k = sum_n e_((n-k) mod N) * c_n. Rotations of S need no rows of their
// own: the barrel rotator that follows derives them. Compared with a plain
// DA memory of 2^N rows per output this stores G(N) rows in all (4 instead
// of 8 for N = 3, 8 instead of 32 for N = 5).
//
// The contents are computed at elaboration from the coefficient parameter,
// so the memory is a ROM. Read is combinational (address decoder, memory
// and rotator form one path in the bit cycle).
module gda_group_rom #(
  parameter int unsigned N  = 3,
  parameter int unsigned W  = 16,                          // word width
  parameter int          COEF [N] = '{10215, -14761, -3646},
  parameter int unsigned GW = $clog2(gda_pkg::num_groups(N))
) (
  input  logic        [GW-1:0] group,
  output logic signed [W-1:0]  row [N]
);
  import gda_pkg::*;

  localparam int unsigned G = num_groups(N);

  function automatic int entry(input int unsigned g, input int unsigned k);
    logic [MAX_N-1:0] s;
    int sum;
    s = seed_of_group(g, N);
    sum = 0;
    for (int unsigned n = 0; n < N; n++)
      if (s[(n + N - k) % N]) sum += COEF[n];
    return sum;
  endfunction

  logic signed [W-1:0] mem [2**GW][N];

  for (genvar g = 0; g < 2**GW; g++) begin : g_row
    for (genvar k = 0; k < N; k++) begin : g_word
      assign mem[g][k] = (g < G) ? W'(entry(g, k)) : '0;
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_out
    assign row[k] = mem[group][k];
  end

endmodule
