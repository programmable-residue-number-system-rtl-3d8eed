// mux_decoder: selector decoder of one multiplexer module.
//
// The 5-bit selector a_1..a_5 (a_1 is the most significant bit, sel[4]) is
// decoded into M lines d_1..d_M; line d_(k+1) (bit d[k]) is high exactly when
// the selector holds the binary value k, as in the modulo-25 function table.
// Selector codes M..31 are not residues and leave every line low, so the
// multiplexer that follows drives 0 for them; the circuit the design
// describes leaves that case open.
//
// In the nMOS original each line is a pass-transistor network with an
// inverting buffer, and neighbouring lines d_1/d_2, d_3/d_4, ... share the
// network that decodes a_1..a_4 and differ only in a_5. That sharing is
// mirrored here: a pair enable is decoded from sel[4:1] and split by sel[0].
// Purely combinational.
module mux_decoder
  import rns_pkg::*;
#(
  parameter int unsigned M = 25            // number of decoded lines (the modulus)
) (
  input  residue_t     sel,                // selector a_1..a_5, a_1 = sel[4]
  output logic [M-1:0] d                   // d[k] is line d_(k+1)
);

  localparam int unsigned NPAIR = (M + 1) / 2;

  logic [NPAIR-1:0] pair_en;               // shared a_1..a_4 decode of lines 2j, 2j+1

  always_comb begin
    for (int unsigned j = 0; j < NPAIR; j++)
      pair_en[j] = (sel[RES_W-1:1] == (RES_W-1)'(j));
    for (int unsigned k = 0; k < M; k++)
      d[k] = pair_en[k/2] & (sel[0] == k[0]);
  end

  initial assert (M >= 2 && M <= 2**RES_W)
    else $error("mux_decoder: M=%0d does not fit a %0d-bit selector", M, RES_W);

endmodule
