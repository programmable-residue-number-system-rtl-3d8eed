// pass_mux: data section of one multiplexer module.
//
// Each of the M programmed data words B_i (5 bits, B_i1..B_i5) sits behind a
// row of pass transistors gated by decoder line d_i; the rows are wired
// together onto the 5 output lines. With exactly one line high the output is
// the selected word. Here the pass rows become an AND-OR: with no line high
// the output is 0 (the transistor circuit would leave it floating), and the
// decoder never raises more than one line. Purely combinational.
module pass_mux
  import rns_pkg::*;
#(
  parameter int unsigned M = 25            // number of data inputs (the modulus)
) (
  input  logic [M-1:0] d,                  // one-hot enables from mux_decoder
  input  residue_t     b [M],              // programmed data inputs, b[i] is B_(i+1)
  output residue_t     y                   // multiplexer output
);

  always_comb begin
    y = '0;
    for (int unsigned i = 0; i < M; i++)
      y |= b[i] & {RES_W{d[i]}};
  end

endmodule
