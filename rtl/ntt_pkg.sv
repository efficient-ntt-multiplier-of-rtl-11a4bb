// ntt_pkg: constants, types and elaboration-time helper functions shared by
// the sntrup761 NTT multiplier.
//
// The ring is R/q = Z_q[x]/(x^p - x - 1) with p = 761 and q = 4591
// (sntrup761). The product of two ring elements is computed as a cyclic
// convolution of length 1536 = 3 * 512 using Good's trick (index k maps to
// (k mod 3, k mod 512)), evaluated with 512-point NTTs modulo the three primes
// 15361, 12289 and 7681 and recombined with the Chinese remainder theorem.
// Each prime has a primitive 512-th root of unity omega; the twiddle ROM
// stores omega^n for n = 0..511 as signed 14-bit centred values.
//
// The choice of omega (g^((qj-1)/512) for the smallest base g that yields a
// primitive 512-th root) is this design's own; the primes, p, q, the 512-point
// size and the 14-bit signed twiddle format follow the source design.
package ntt_pkg;

  // Ring parameters (sntrup761)
  localparam int unsigned P       = 761;
  localparam int unsigned Q       = 4591;
  localparam int unsigned COEF_W  = 13;            // signed centred coefficient, |c| <= 2295

  // NTT parameters
  localparam int unsigned N       = 512;           // NTT length (z dimension)
  localparam int unsigned NY      = 3;             // Good's trick y dimension
  localparam int unsigned RES_W   = 14;            // residue width (all primes < 2^14)
  localparam int unsigned TW_W    = 14;            // signed twiddle width

  // The three NTT-friendly primes, lane 0..2
  localparam int unsigned Q0 = 15361;
  localparam int unsigned Q1 = 12289;
  localparam int unsigned Q2 = 7681;

  // Primitive 512-th roots of unity per lane
  localparam int unsigned W0 = 5301;               // 7^30    mod 15361
  localparam int unsigned W1 = 3400;               // 11^24   mod 12289
  localparam int unsigned W2 = 4055;               // 13^15   mod 7681

  // Bank layout: operand A (and later the product) in words 0..1535,
  // operand B in words 1536..3071; y-residue r of an operand at r*512.
  localparam int unsigned BANK_DEPTH = 2 * NY * N; // 3072
  localparam int unsigned BANK_AW    = 12;
  localparam int unsigned B_BASE     = NY * N;     // 1536

  typedef logic [BANK_AW-1:0] bank_addr_t;
  typedef logic [RES_W-1:0]   res_t;
  typedef logic signed [TW_W-1:0]   tw_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Operation carried with each lane command
  typedef enum logic [2:0] {
    OP_NOP   = 3'd0,
    OP_LOAD  = 3'd1,   // write a (converted) input coefficient to addr0
    OP_CT    = 3'd2,   // forward Cooley-Tukey butterfly on addr0/addr1
    OP_GS    = 3'd3,   // inverse Gentleman-Sande butterfly on addr0/addr1
    OP_PWRD  = 3'd4,   // read a_k (addr0) and b_k (addr1) into the pointwise buffer
    OP_PWWR  = 3'd5,   // write product coefficient c_k to addr0
    OP_OUTRD = 3'd6    // read addr0 for the CRT stage
  } lane_op_e;

  typedef struct packed {
    lane_op_e   op;
    bank_addr_t addr0;
    bank_addr_t addr1;
    logic [1:0] k;        // pointwise index 0..2
    coef_t      coef;     // input coefficient for OP_LOAD
  } lane_cmd_t;

  // (base^exp) mod m, elaboration time
  function automatic longint unsigned modpow(int unsigned base,
                                             int unsigned exp,
                                             int unsigned m);
    longint unsigned r, b, mm;
    int unsigned e;
    mm = longint'(m);
    r = 1; b = longint'(base) % mm; e = exp;
    while (e != 0) begin
      if (e[0]) r = (r * b) % mm;
      b = (b * b) % mm;
      e = e >> 1;
    end
    return r;
  endfunction

  // Modular inverse for a prime modulus (Fermat)
  function automatic longint unsigned modinv(int unsigned a, int unsigned m);
    return modpow(a, m - 2, m);
  endfunction

  // Centred signed representative of v mod m
  function automatic longint signed centre(longint unsigned v, int unsigned m);
    longint unsigned r, mm;
    mm = longint'(m);
    r = v % mm;
    if (r > mm / 2) return longint'(r) - longint'(mm);
    else           return longint'(r);
  endfunction

  // Barrett constant floor(2^k / m)
  function automatic longint unsigned barrett_m(int unsigned k, int unsigned m);
    return (longint'(1) << k) / longint'(m);
  endfunction

endpackage
