// ks_pkg: constants and types shared by the three keystream generators.
//
// Feedback polynomials are written as masks of their low coefficients:
// for p(x) = x^L + c_{L-1} x^{L-1} + ... + c_1 x + c_0, bit i of the mask is
// c_i (c_0 is always 1). With the Fibonacci LFSR of lfsr.sv (shift towards
// bit 0, output q[0]) the new top stage is the parity of (state & mask),
// which realises the recurrence a_{k+L} = sum_i c_i a_{k+i}.
//
// Polynomials printed in the source paper: h(x) = x^5+x^2+1 (Toeplitz hash of
// stream cipher 1), Q(x) = x^9+x^4+1, G1(x) = x^6+x^5+x^4+x^3+1 and
// G2(x) = x^2+x+1 (stream cipher 2). The polynomials of R1, R2, R3 and of the
// stream cipher 1 state register are not given; primitive polynomials from
// standard maximal-length tables are used instead.
package ks_pkg;

  // ---- alternating step generator (K-generator) ----
  localparam int unsigned ASG_L1 = 128;  // length of R1 (paper: l = 128)
  localparam int unsigned ASG_L2 = 89;   // length of R2 (paper: m > 80)
  localparam int unsigned ASG_L3 = 97;   // length of R3 (paper: n > 80)
  localparam int unsigned ASG_W  = 4;    // weighted bits per delta (paper: 1 < w < 5)
  localparam int unsigned ASG_IDXW = 6;  // index width, 6-to-64 decoder

  // x^128 + x^126 + x^101 + x^99 + 1
  localparam logic [127:0] ASG_TAPS1 =
      (128'd1 << 126) | (128'd1 << 101) | (128'd1 << 99) | 128'd1;
  // x^89 + x^51 + 1
  localparam logic [88:0] ASG_TAPS2 = (89'd1 << 51) | 89'd1;
  // x^97 + x^91 + 1
  localparam logic [96:0] ASG_TAPS3 = (97'd1 << 91) | 97'd1;

  // Clock-control states, named as in the state diagram of the CCG:
  // S1 decides, S2 clocks R3 del2 times, S3 clocks R2 del1 times.
  typedef enum logic [1:0] {
    CCG_S1 = 2'd0,
    CCG_S2 = 2'd1,
    CCG_S3 = 2'd2
  } ccg_state_e;

  // ---- stream cipher 1 (Toeplitz-hash keystream generator) ----
  localparam int unsigned SC1_N = 5;             // hash output length n
  localparam int unsigned SC1_M = 9;             // hash input length m
  localparam logic [4:0] SC1_HPOLY = 5'b00101;   // h(x) = x^5 + x^2 + 1
  localparam logic [4:0] SC1_HINIT = 5'b11000;   // (A0..A4) = (0 0 0 1 1)
  localparam logic [3:0] SC1_SPOLY = 4'b0011;    // x^4 + x + 1 (assumed)

  // ---- stream cipher 2 (reseeded filter generator) ----
  localparam int unsigned SC2_M  = 9;            // LFSR length m
  localparam int unsigned SC2_N  = 9;            // reseed count exponent n
  localparam logic [8:0] SC2_QPOLY  = 9'b000010001; // Q(x)  = x^9 + x^4 + 1
  localparam int unsigned SC2_D1 = 6;
  localparam logic [5:0] SC2_G1POLY = 6'b111001;    // G1(x) = x^6+x^5+x^4+x^3+1
  localparam int unsigned SC2_D2 = 2;
  localparam logic [1:0] SC2_G2POLY = 2'b11;        // G2(x) = x^2 + x + 1

endpackage
