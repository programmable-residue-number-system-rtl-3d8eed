// mod_m_unit: two-level multiplexer structure computing a two-input function
// modulo M; by default the modulo-m multiplier |u*v|_M.
//
// First level: one multiplexer per value of v ("MUX Q 1" .. "MUX Q (M-1)").
// Multiplexer r has its data input D_(j+1) programmed with the constant
// f(j, r), so with u on its selector it outputs f(u, r) (for the multiplier,
// |r*u|_M). All first-level multiplexers share one selector decoder driven by
// u. Second level: multiplexer "MUX Q M" with its own decoder driven by v;
// its input D_(r+1) is the output of first-level multiplexer r, so it passes
// f(u, v). When f(u, 0) is the same for every u (0 for the multiplier) the
// D_1 input of the second level is tied to that constant and first-level
// multiplexer 0 is omitted, giving the M multiplexers of the original
// structure; otherwise (the mixed-radix cell) a multiplexer 0 is added.
//
// OP chooses what is programmed: OP_MUL |u*v|_M, OP_MRC |(u-v)*P^-1|_M for
// the mixed-radix converter cells, OP_ADD and OP_SUB. The programmed words are
// elaboration-time constants. Inputs are residues (u, v < M); an out-of-range
// selector selects nothing and gives 0 from that level.
// Purely combinational: one decoder plus two multiplexer levels from input
// to output, no clock.
module mod_m_unit
  import rns_pkg::*;
#(
  parameter int unsigned M  = 25,          // modulus: number of data inputs per multiplexer
  parameter op_e         OP = OP_MUL,      // programmed function
  parameter int unsigned P  = 17           // modulus inverted by OP_MRC (ignored otherwise)
) (
  input  residue_t u,                      // first-level selector (multiplicand X)
  input  residue_t v,                      // second-level selector (multiplier Y)
  output residue_t y                       // f(u, v) mod M
);

  // True when the v = 0 row does not depend on u, so it needs no multiplexer.
  function automatic bit row0_constant();
    for (int unsigned j = 1; j < M; j++)
      if (unit_value(OP, M, P, j, 0) != unit_value(OP, M, P, 0, 0)) return 1'b0;
    return 1'b1;
  endfunction

  localparam bit ROW0_CONST = row0_constant();

  logic [M-1:0] d_u;                       // shared first-level decoder lines
  logic [M-1:0] d_v;                       // second-level decoder lines
  residue_t     lvl1 [M];                  // first-level outputs = second-level data inputs

  mux_decoder #(.M(M)) u_dec_u (.sel(u), .d(d_u));
  mux_decoder #(.M(M)) u_dec_v (.sel(v), .d(d_v));

  for (genvar r = 0; r < M; r++) begin : g_row
    if (r == 0 && ROW0_CONST) begin : g_const
      assign lvl1[r] = residue_t'(unit_value(OP, M, P, 0, 0));
    end else begin : g_mux
      residue_t prog [M];                  // programmed data inputs of this multiplexer
      for (genvar j = 0; j < M; j++) begin : g_prog
        assign prog[j] = residue_t'(unit_value(OP, M, P, j, r));
      end
      pass_mux #(.M(M)) u_mux (.d(d_u), .b(prog), .y(lvl1[r]));
    end
  end

  pass_mux #(.M(M)) u_mux_out (.d(d_v), .b(lvl1), .y(y));

  initial assert (OP != OP_MRC || mod_inverse(P, M) != 0)
    else $error("mod_m_unit: %0d has no inverse modulo %0d", P, M);

endmodule
