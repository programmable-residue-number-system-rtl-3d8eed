// mixed_radix_checker: mixed-radix converter array used as the on-line
// single-residue fault detector.
//
// The residues x_1..x_N of a number (N = N_NONRED + N_RED, moduli ascending)
// are converted to mixed-radix digits a_1..a_N by the upper-left triangular
// array of cells s(p+1,k) = |(s(p,k) - a_p) * m_p^-1|_(m_k), with s(1,k) = x_k
// and a_p = s(p,p). Row p of the array has one cell per column k > p; every
// cell is a mod_m_unit programmed with OP_MRC, fed with u = s(p,k) on its
// first-level selectors and v = a_p on its second-level selector.
//
// Because every redundant modulus exceeds every non-redundant one, the number
// is legitimate (below the product of the non-redundant moduli) exactly when
// all redundant digits a_(N_NONRED+1).. are zero. A non-zero redundant digit
// raises `illegitimate`: either the result overflowed the legitimate range or
// one residue is in error (the two cannot be told apart, and are assumed not
// to occur together). The first digit a_1 is x_1 itself, a plain wire.
// The array shape, the cell equation and the detection rule are those of the
// original design. Building each cell as a multiplexer unit with an extra
// first-level row for v = 0 is this implementation's choice (see
// mod_m_unit). Checking the checker itself is not implemented.
// Purely combinational; N-1 cells in series on the path to a_N.
module mixed_radix_checker
  import rns_pkg::*;
(
  input  residue_t x [N_MOD],              // residues, x[i] modulo MODULI[i]
  output residue_t a [N_MOD],              // mixed-radix digits, a[0] least significant
  output logic     illegitimate            // redundant digit non-zero: overflow or fault
);

  // Row p of the array sees g_row[p].s[k] (only k >= p is used) and hands
  // its cell outputs to row p+1; s of row 0 is x itself.
  for (genvar p = 0; p < N_MOD; p++) begin : g_row
    residue_t s [N_MOD];                   // s(p+1,k) in the recursion, 0-based

    for (genvar k = 0; k < N_MOD; k++) begin : g_col
      if (p == 0) begin : g_x
        assign s[k] = x[k];
      end else if (k >= p) begin : g_cell
        mod_m_unit #(.M(MODULI[k]), .OP(OP_MRC), .P(MODULI[p-1])) u_cell (
          .u(g_row[p-1].s[k]),
          .v(g_row[p-1].s[p-1]),
          .y(s[k])
        );
      end else begin : g_unused
        assign s[k] = '0;                  // left of the triangle: not used
      end
    end

    assign a[p] = s[p];
  end

  always_comb begin
    illegitimate = 1'b0;
    for (int unsigned k = N_NONRED; k < N_MOD; k++)
      illegitimate |= (a[k] != '0);
  end

endmodule
