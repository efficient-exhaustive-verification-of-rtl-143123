// collatz_pkg -- constants and table-generation functions shared by the
// Collatz verification coprocessor.
//
// The coprocessor replaces runs of the elementary Collatz steps
// (n even: n/2, n odd: 3n+1) by one "table operation"
//     n <- B[n_L] * n_H + C[n_L],   n = 2^d * n_H + n_L,
// where the pair (B, C) for every d-bit residue n_L is found by tracking
// n = b*n_H + c symbolically: start with b = 2^d, c = n_L; while b is even,
// apply the odd rule (c odd: b <- 3b, c <- 3c+1) or the even rule
// (c even: b <- b/2, c <- c/2). The loop ends after exactly d even rules,
// when b = 3^j is odd. A residue is "mandatory" when b never drops below
// 2^d during this walk; a start value with a non-mandatory residue is
// guaranteed to fall below itself within the first table operation and needs
// no work. These functions are evaluated when the table RAMs are initialised;
// they stand for the block-RAM initial contents of an FPGA bitstream.
//
// Default sizes follow the document: base bits 10 for B/C, 15 for S,
// 1295 mandatory 15-bit residues, 17-bit digits, six digits of n_H, and a
// 78-bit start value m = M(46) : m_H(17) : m_L(15).
package collatz_pkg;

  // Digit width of the DSP-based digit-serial multiplier.
  localparam int unsigned DIGIT_W  = 17;
  // Base bits of the B/C table and of the S table.
  localparam int unsigned D_BC     = 10;
  localparam int unsigned D_S      = 15;
  // Word width of B and of C for D_BC = 10 (3^10 = 59049 < 2^16).
  localparam int unsigned BC_W     = 16;
  // Number of mandatory residues for D_S = 15.
  localparam int unsigned S_COUNT  = 1295;
  // Digits of n_H held by the coprocessor (n is 10 + 6*17 = 112 bits).
  localparam int unsigned N_DIGITS = 6;
  // Widths of the three fields of a start value m.
  localparam int unsigned M_W      = 46;
  localparam int unsigned MH_W     = 17;

  // Result of walking the even/odd rules over one d-bit residue.
  typedef struct packed {
    logic [63:0] b;         // final b = 3^j
    logic [63:0] c;         // final c
    logic        mandatory; // b stayed >= 2^d all the way
  } rule_walk_t;

  function automatic rule_walk_t walk_rules(input int unsigned d,
                                            input longint unsigned nl);
    rule_walk_t r;
    longint unsigned b, c, lim;
    b   = 64'd1 << d;
    c   = nl;
    lim = 64'd1 << d;
    r.mandatory = 1'b1;
    while (b[0] == 1'b0) begin
      if (c[0]) begin
        b = 3 * b;
        c = 3 * c + 1;
      end else begin
        b = b >> 1;
        c = c >> 1;
      end
      if (b < lim) r.mandatory = 1'b0;
    end
    r.b = b;
    r.c = c;
    return r;
  endfunction

endpackage
