// tb_mod_m_unit: exhaustive check of the two-level multiplexer unit.
// The default instance (modulo-25 multiplier) and multipliers for 17, 19, 23
// and 29 are compared with |u*v|_m for every residue pair; mixed-radix cells
// (|(u-v)*p^-1|_m, inverse found by search in the testbench) and the adder
// and subtractor programmings are checked the same way.
module tb_mod_m_unit;
  import rns_pkg::*;

  int checks = 0, failures = 0;
  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  residue_t u, v;
  residue_t y25, y17, y19, y23, y29, c29_25, c23_17, a19, s23;

  mod_m_unit                                     dut     (.u(u), .v(v), .y(y25));
  mod_m_unit #(.M(17))                           mul17   (.u(u), .v(v), .y(y17));
  mod_m_unit #(.M(19))                           mul19   (.u(u), .v(v), .y(y19));
  mod_m_unit #(.M(23))                           mul23   (.u(u), .v(v), .y(y23));
  mod_m_unit #(.M(29))                           mul29   (.u(u), .v(v), .y(y29));
  mod_m_unit #(.M(29), .OP(OP_MRC), .P(25))      mrc2925 (.u(u), .v(v), .y(c29_25));
  mod_m_unit #(.M(23), .OP(OP_MRC), .P(17))      mrc2317 (.u(u), .v(v), .y(c23_17));
  mod_m_unit #(.M(19), .OP(OP_ADD))              add19   (.u(u), .v(v), .y(a19));
  mod_m_unit #(.M(23), .OP(OP_SUB))              sub23   (.u(u), .v(v), .y(s23));

  function automatic int inv(int p, int m);
    for (int i = 1; i < m; i++) if ((p * i) % m == 1) return i;
    return -1;
  endfunction

  task automatic chk(string what, residue_t got, int exp_val);
    checks++;
    if (int'(got) != exp_val) begin
      failures++;
      if (failures < 20)
        $display("%s u=%0d v=%0d: got %0d expected %0d", what, u, v, got, exp_val);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i2925, i2317;
    i2925 = inv(25, 29);
    i2317 = inv(17, 23);
    for (int a = 0; a < 29; a++)
      for (int b = 0; b < 29; b++) begin
        u = residue_t'(a);
        v = residue_t'(b);
        #1;
        if (a < 25 && b < 25) chk("mul25", y25, (a * b) % 25);
        if (a < 17 && b < 17) chk("mul17", y17, (a * b) % 17);
        if (a < 19 && b < 19) chk("mul19", y19, (a * b) % 19);
        if (a < 23 && b < 23) chk("mul23", y23, (a * b) % 23);
        chk("mul29", y29, (a * b) % 29);
        if (b < 25) chk("mrc29/25", c29_25, (((a - b + 29) % 29) * i2925) % 29);
        if (a < 23 && b < 17) chk("mrc23/17", c23_17, (((a - b + 23) % 23) * i2317) % 23);
        if (a < 19 && b < 19) chk("add19", a19, (a + b) % 19);
        if (a < 23 && b < 23) chk("sub23", s23, (a - b + 23) % 23);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
