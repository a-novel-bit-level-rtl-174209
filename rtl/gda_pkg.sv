// gda_pkg: shared constants and elaboration-time helpers for the Group
// Distributed Arithmetic (GDA) designs.
//
// GDA evaluates an N-point cyclic convolution u_k = sum_n e_((n-k) mod N) * c_n
// bit-serially. In every bit cycle the N bits {e_0[q] .. e_(N-1)[q]} form a
// DA address V. All addresses that are cyclic rotations of one another belong
// to the same group; the group is named by its seed, the numerically smallest
// rotation. With V = rotl(seed, r) (bit i of the seed moved to bit (i+r) mod N)
// the N partial products of V are those of the seed, rotated: word k of V is
// word (k + r) mod N of the seed. So one memory holds one N-word row per group
// and a barrel rotator restores the order.
//
// The functions below derive, for a given N, the seed, group number and
// rotating factor of any address. Groups are numbered in increasing seed
// order, as in the group tables of the 5-point and 7-point examples
// (0 -> group 0, the single-one seed -> group 1, ..., all-ones -> last group).
// They are evaluated at elaboration only (constant arguments), so decoders and
// group memories become fixed lookup logic.
//
// The fixed-point coefficients are the rounded values of the cosines and
// sines the transforms need; the formula is given beside each table.
package gda_pkg;

  // Largest cyclic-convolution length the helpers handle.
  localparam int unsigned MAX_N = 8;

  // Rotate the low n bits of v left by r (bit i -> bit (i+r) mod n).
  function automatic logic [MAX_N-1:0] rotl(input logic [MAX_N-1:0] v,
                                            input int unsigned n,
                                            input int unsigned r);
    logic [MAX_N-1:0] o;
    o = '0;
    for (int unsigned i = 0; i < n; i++) o[(i + r) % n] = v[i];
    return o;
  endfunction

  // Seed of the group of v: the smallest value among its n rotations.
  function automatic logic [MAX_N-1:0] seed_of(input logic [MAX_N-1:0] v,
                                               input int unsigned n);
    logic [MAX_N-1:0] best;
    best = v;
    for (int unsigned r = 1; r < n; r++)
      if (rotl(v, n, r) < best) best = rotl(v, n, r);
    return best;
  endfunction

  // Rotating factor: the smallest r with v == rotl(seed_of(v), r).
  function automatic int unsigned rot_of(input logic [MAX_N-1:0] v,
                                         input int unsigned n);
    logic [MAX_N-1:0] s;
    s = seed_of(v, n);
    for (int unsigned r = 0; r < n; r++)
      if (rotl(s, n, r) == v) return r;
    return 0;
  endfunction

  // Group number of v: how many seeds are smaller than its own seed.
  function automatic int unsigned group_of(input logic [MAX_N-1:0] v,
                                           input int unsigned n);
    logic [MAX_N-1:0] s;
    int unsigned g;
    s = seed_of(v, n);
    g = 0;
    for (int unsigned a = 0; a < (1 << n); a++)
      if (seed_of(MAX_N'(a), n) == MAX_N'(a) && MAX_N'(a) < s) g++;
    return g;
  endfunction

  // Number of groups G(N) for an n-bit address.
  function automatic int unsigned num_groups(input int unsigned n);
    int unsigned g;
    g = 0;
    for (int unsigned a = 0; a < (1 << n); a++)
      if (seed_of(MAX_N'(a), n) == MAX_N'(a)) g++;
    return g;
  endfunction

  // Seed of group number g.
  function automatic logic [MAX_N-1:0] seed_of_group(input int unsigned g,
                                                     input int unsigned n);
    int unsigned cnt;
    cnt = 0;
    for (int unsigned a = 0; a < (1 << n); a++)
      if (seed_of(MAX_N'(a), n) == MAX_N'(a)) begin
        if (cnt == g) return MAX_N'(a);
        cnt++;
      end
    return '0;
  endfunction

  // ---------------------------------------------------------------------
  // 7-point DCT constants (Q1.14, i.e. round(value * 2^14)).
  // Kernel coefficients {cos(2a), cos(6a), cos(4a)}, a = pi/7.
  localparam int DCT7_COEF_FRAC = 14;
  localparam int DCT7_KC [3] = '{10215, -14761, -3646};
  // Output scaling cos(pi*k/14), k = 0..6.
  localparam int DCT7_PC [7] = '{16384, 15973, 14761, 12810, 10215, 7109, 3646};

  // ---------------------------------------------------------------------
  // 11-point DFT/DHT constants (Q12, round(value * 2^12)), generator g = 2.
  // Cosine memory: c_m = cos(2*pi*(2^m mod 11)/11), m = 0..4.
  // Sine memory:   s'_m = (-1)^m * sin(2*pi*(2^m mod 11)/11), m = 0..4.
  localparam int P11_COEF_FRAC = 12;
  localparam int P11_C [5] = '{3446, 1702, -2682, -583, -3930};
  localparam int P11_S [5] = '{2214, -3726, 3096, 4054, 1154};

  // ---------------------------------------------------------------------
  // 29-point DHT constants, generator g = 2. The 28-point cyclic convolution
  // is split 4 x 7: position j = 0..27 of the convolution goes to block
  // j mod 4, word j mod 7. DHT29_MAP[7*a + b] = 2^j mod 29 for that j, the
  // sample (and output) index it carries.
  localparam int DHT29_MAP [28] = '{ 1, 24, 25, 20, 16,  7, 23,
                                    17,  2, 19, 21, 11,  3, 14,
                                    28,  5,  4,  9, 13, 22,  6,
                                    12, 27, 10,  8, 18, 26, 15};
  // Coefficient block a (DHT29_Ca): round(2^12 * cas(2*pi*DHT29_MAP[7*a + b]/29)),
  // cas(t) = cos(t) + sin(t).
  localparam int DHT29_COEF_FRAC = 12;
  localparam int DHT29_C0 [7] = '{ 4881, -1700,  -470, -5321, -5189,  4312, -2851};
  localparam int DHT29_C1 [7] = '{-5621,  5437, -5689, -4705,  -157,  5740, -3629};
  localparam int DHT29_C2 [7] = '{ 3120,  5537,  5774,  2289, -2574, -3868,  5042};
  localparam int DHT29_C3 [7] = '{-1398,  1998,  1092,  3379, -5790,   782, -4515};

  // Transform computed by the 11-point GDA datapath.
  typedef enum logic {XFORM_DFT = 1'b0, XFORM_DHT = 1'b1} xform_e;

endpackage
