// rns_multiplier: residue number system multiplier with single-residue fault
// detection, built only from identical 5-bit multiplexer modules.
//
// Operands arrive as residues modulo 17, 19, 23, 25 (non-redundant) and
// 29 (redundant). One modulo-m multiplier (mod_m_unit) per modulus forms
// z_i = |x_i * y_i|_(m_i); the five channels run in parallel and never
// exchange carries. The product residues then pass through the
// mixed-radix converter array (mixed_radix_checker), which delivers the
// product's mixed-radix digits and flags an illegitimate result: a product
// at or above 185725 (overflow) or a product one of whose residues is wrong.
//
// Interface: x, y, z, mr_digit are indexed by channel, 0..4 for moduli
// 17, 19, 23, 25, 29. Residue inputs must be below their modulus.
// Timing: purely combinational, no clock or reset; the longest path runs
// through one multiplier channel and four converter cells.
module rns_multiplier
  import rns_pkg::*;
(
  input  residue_t x        [N_MOD],       // multiplicand residues
  input  residue_t y        [N_MOD],       // multiplier residues
  output residue_t z        [N_MOD],       // product residues
  output residue_t mr_digit [N_MOD],       // mixed-radix digits of the product
  output logic     illegitimate            // overflow or single residue fault
);

  for (genvar i = 0; i < N_MOD; i++) begin : g_ch
    residue_t prod;                        // product residue of channel i
    mod_m_unit #(.M(MODULI[i]), .OP(OP_MUL)) u_mul (
      .u(x[i]),
      .v(y[i]),
      .y(prod)
    );
    assign z[i] = prod;
  end

  mixed_radix_checker u_checker (
    .x(z),
    .a(mr_digit),
    .illegitimate(illegitimate)
  );

endmodule
