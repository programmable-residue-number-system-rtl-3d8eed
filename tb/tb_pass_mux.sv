// tb_pass_mux: drives random programmed words onto the 25 data inputs,
// raises each enable line in turn and checks the selected word reaches the
// output; also checks the output is 0 with no line raised.
module tb_pass_mux;
  import rns_pkg::*;

  localparam int unsigned M = 25;
  int checks = 0, failures = 0;
  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [M-1:0] d;
  residue_t     b [M];
  residue_t     y;

  pass_mux dut (.d(d), .b(b), .y(y));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < M; i++) b[i] = residue_t'($urandom);
      for (int i = 0; i < M; i++) begin
        d = '0;
        d[i] = 1'b1;
        @(posedge clk);
        checks++;
        if (y !== b[i]) begin
          failures++;
          $display("line %0d: y=%0d expected %0d", i, y, b[i]);
        end
      end
      d = '0;
      @(posedge clk);
      checks++;
      if (y !== '0) begin failures++; $display("no line: y=%0d", y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
