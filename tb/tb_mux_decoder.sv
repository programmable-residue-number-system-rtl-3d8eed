// tb_mux_decoder: exhaustive check of the selector decoder against its
// function table: for every 5-bit selector value k below M exactly line
// d_(k+1) is high, and for the codes M..31 no line is high. Run for the
// 25-line decoder of the table and for the 17- and 29-line extremes.
module tb_mux_decoder;
  import rns_pkg::*;

  int checks = 0, failures = 0;
  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  residue_t    sel;
  logic [24:0] d25;
  logic [16:0] d17;
  logic [28:0] d29;

  mux_decoder               dut   (.sel(sel), .d(d25));
  mux_decoder #(.M(17))     dut17 (.sel(sel), .d(d17));
  mux_decoder #(.M(29))     dut29 (.sel(sel), .d(d29));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) begin
      logic [24:0] e25;
      logic [16:0] e17;
      logic [28:0] e29;
      sel = residue_t'(k);
      e25 = '0; e17 = '0; e29 = '0;
      if (k < 25) e25[k] = 1'b1;
      if (k < 17) e17[k] = 1'b1;
      if (k < 29) e29[k] = 1'b1;
      @(posedge clk);
      checks += 3;
      if (d25 !== e25) begin failures++; $display("M=25 sel=%0d d=%b", k, d25); end
      if (d17 !== e17) begin failures++; $display("M=17 sel=%0d d=%b", k, d17); end
      if (d29 !== e29) begin failures++; $display("M=29 sel=%0d d=%b", k, d29); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
