// turbo_ref_pkg: reference model of the LTE turbo encoder for the testbenches.
//
// Independent of the RTL: the RSC encoder is the XOR shift-register form
// (feedback 1 + D^2 + D^3, parity 1 + D + D^3), the QPP permutation is
// evaluated directly as (f1*i + f2*i*i) mod K, and the coefficients come
// from a short list of LTE block sizes covering all five ranges of the
// size index (40..504, 512..1008, 1024..2016, 2048..4032, 4096..6144).
package turbo_ref_pkg;

  localparam int NREF = 14;
  localparam int REF_K  [NREF] = '{40, 48, 56, 64, 120, 504, 512, 528, 1008, 1024, 1056, 2048, 4096, 6144};
  localparam int REF_F1 [NREF] = '{ 3,  7, 19,  7, 103,  55,  31,  17,   55,   31,   17,   31,   31,  263};
  localparam int REF_F2 [NREF] = '{10, 12, 42, 16,  90,  84,  64,  66,   84,   64,   66,   64,   64,  480};

  // One RSC step. s = {s1, s2, s3}. Returns {next state, encoded bit, parity}.
  function automatic logic [4:0] rsc_step(input logic [2:0] s, input logic x, input logic term);
    logic fb, u, a, z;
    fb = s[1] ^ s[0];
    u  = term ? fb : x;
    a  = u ^ fb;
    z  = a ^ s[2] ^ s[0];
    return {a, s[2], s[1], u, z};
  endfunction

  function automatic int qpp_pi(input int k, input int f1, input int f2, input int i);
    longint v;
    v = (longint'(f1) * i + longint'(f2) * i * i) % k;
    return int'(v);
  endfunction

  // All 188 LTE block sizes, in table order.
  function automatic int lte_size(input int n);
    if (n < 60)  return 40 + 8 * n;
    if (n < 92)  return 512 + 16 * (n - 59);
    if (n < 124) return 1024 + 32 * (n - 91);
    return 2048 + 64 * (n - 123);
  endfunction

endpackage
