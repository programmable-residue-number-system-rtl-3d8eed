// rns_pkg: constants, types and elaboration-time helpers shared by the
// residue number system (RNS) multiplier and its mixed-radix fault detector.
//
// The moduli set follows the design: 17, 19, 23 and 25 are the non-redundant
// moduli and 29 is the single redundant modulus, all held in 5-bit residues so
// every multiplexer cell has the same size. Legitimate range is
// [0, 17*19*23*25) = [0, 185725); total range is [0, 185725*29) = [0, 5386025).
//
// The functions below are only evaluated while elaborating: they compute the
// constant words that are "programmed" onto the data inputs of each
// multiplexer (the B_ij inputs), so nothing here becomes logic by itself.
// The operation codes ADD and SUB are this design's rendering of the remark
// that the same two-level structure serves any two-input modular function.
package rns_pkg;

  // Residue width: ceil(log2(m)) for every modulus in the set is 5.
  localparam int unsigned RES_W = 5;

  // Moduli count: N_NONRED non-redundant followed by N_RED redundant.
  localparam int unsigned N_NONRED = 4;
  localparam int unsigned N_RED    = 1;
  localparam int unsigned N_MOD    = N_NONRED + N_RED;

  // Moduli in ascending order; each redundant modulus exceeds every
  // non-redundant one, which the overflow/error test relies on.
  localparam int unsigned MODULI [N_MOD] = '{17, 19, 23, 25, 29};

  typedef logic [RES_W-1:0] residue_t;

  // Function programmed onto a two-level multiplexer unit, with u on the
  // first-level selectors and v on the second-level selector.
  typedef enum logic [1:0] {
    OP_MUL = 2'd0,   // |u * v|_m                     (modulo-m multiplier)
    OP_MRC = 2'd1,   // |(u - v) * inverse(P)|_m       (mixed-radix converter cell)
    OP_ADD = 2'd2,   // |u + v|_m
    OP_SUB = 2'd3    // |u - v|_m
  } op_e;

  // Multiplicative inverse of p modulo m (p and m relatively prime, m > 1).
  function automatic int unsigned mod_inverse(int unsigned p, int unsigned m);
    for (int unsigned i = 1; i < m; i++)
      if (((p % m) * i) % m == 1) return i;
    return 0;
  endfunction

  // Value programmed for selector pair (u, v) of a unit computing OP mod m.
  // For OP_MRC, p is the modulus whose inverse scales the difference.
  function automatic int unsigned unit_value(op_e op, int unsigned m,
                                             int unsigned p,
                                             int unsigned u, int unsigned v);
    int unsigned uu, vv;
    uu = u % m;
    vv = v % m;
    case (op)
      OP_MUL:  return (uu * vv) % m;
      OP_MRC:  return (((uu + m - vv) % m) * mod_inverse(p, m)) % m;
      OP_ADD:  return (uu + vv) % m;
      default: return (uu + m - vv) % m;
    endcase
  endfunction

endpackage
