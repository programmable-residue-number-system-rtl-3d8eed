// tb_rns_multiplier: end-to-end test of the RNS multiplier at its default
// configuration. Integer operands X, Y below 185725 are converted to
// residues in the testbench; the product residues, the mixed-radix digits of
// |X*Y| mod 5386025 and the illegitimate flag are checked against integer
// arithmetic; the flag is expected exactly when |X*Y| mod 5386025 is at
// least 185725. Three situations are exercised and counted: legitimate
// products (flag low), overflowing products (flag high) and single residue
// faults, made by forcing one channel's product residue to a wrong value,
// which the fault detector must flag. Zero operands (the constant D_1 input
// of the second multiplexer level) are counted as well. Each situation must
// occur at least once.
module tb_rns_multiplier;
  import rns_pkg::*;

  int checks = 0, failures = 0;
  int n_legit = 0, n_over = 0, n_alias = 0, n_zero = 0;
  int n_fault [5] = '{0, 0, 0, 0, 0};
  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  residue_t x [N_MOD], y [N_MOD], z [N_MOD], mr [N_MOD];
  logic     illegitimate;

  rns_multiplier dut (.x(x), .y(y), .z(z), .mr_digit(mr), .illegitimate(illegitimate));

  localparam longint MODS [5] = '{17, 19, 23, 25, 29};
  localparam longint M_LEGIT = 185725;
  localparam longint M_TOTAL = 5386025;

  task automatic err(string msg);
    failures++;
    if (failures < 20) $display("%s", msg);
  endtask

  task automatic run_product(longint xv, longint yv);
    longint p, q;
    for (int i = 0; i < 5; i++) begin
      x[i] = residue_t'(xv % MODS[i]);
      y[i] = residue_t'(yv % MODS[i]);
    end
    @(posedge clk);
    p = (xv * yv) % M_TOTAL;
    q = p;
    for (int i = 0; i < 5; i++) begin
      checks += 2;
      if (longint'(z[i]) != (xv * yv) % MODS[i])
        err($sformatf("X=%0d Y=%0d z[%0d]=%0d", xv, yv, i, z[i]));
      if (longint'(mr[i]) != q % MODS[i])
        err($sformatf("X=%0d Y=%0d mr[%0d]=%0d", xv, yv, i, mr[i]));
      q = q / MODS[i];
    end
    checks++;
    // The detector sees only |X*Y| mod 5386025: a product that wraps past the
    // total range back into the legitimate range cannot be flagged.
    if (illegitimate !== (p >= M_LEGIT))
      err($sformatf("X=%0d Y=%0d illegitimate=%0b", xv, yv, illegitimate));
    if (xv * yv < M_LEGIT) n_legit++;
    else if (p >= M_LEGIT) n_over++;
    else n_alias++;
    if (xv == 0 || yv == 0) n_zero++;
  endtask

  // Legitimate product with channel ch's product residue forced wrong.
  task automatic run_fault(int ch);
    longint xv, yv, good, bad;
    xv = longint'($urandom) % 400;
    yv = longint'($urandom) % 400;
    for (int i = 0; i < 5; i++) begin
      x[i] = residue_t'(xv % MODS[i]);
      y[i] = residue_t'(yv % MODS[i]);
    end
    good = (xv * yv) % MODS[ch];
    bad  = (good + 1 + longint'($urandom) % 16) % MODS[ch];
    case (ch)
      0: force dut.g_ch[0].prod = residue_t'(bad);
      1: force dut.g_ch[1].prod = residue_t'(bad);
      2: force dut.g_ch[2].prod = residue_t'(bad);
      3: force dut.g_ch[3].prod = residue_t'(bad);
      default: force dut.g_ch[4].prod = residue_t'(bad);
    endcase
    @(posedge clk);
    checks += 2;
    if (longint'(z[ch]) != bad) err($sformatf("fault ch %0d not applied", ch));
    if (!illegitimate)
      err($sformatf("X=%0d Y=%0d fault in channel %0d (%0d->%0d) not detected", xv, yv, ch, good, bad));
    else
      n_fault[ch]++;
    case (ch)
      0: release dut.g_ch[0].prod;
      1: release dut.g_ch[1].prod;
      2: release dut.g_ch[2].prod;
      3: release dut.g_ch[3].prod;
      default: release dut.g_ch[4].prod;
    endcase
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_product(0, 12345);
    run_product(185724, 1);
    run_product(430, 431);          // 185330: legitimate
    run_product(431, 431);          // 185761: just overflows
    for (int t = 0; t < 2000; t++) begin
      if (t % 2 == 0) run_product(longint'($urandom) % 431, longint'($urandom) % 431);
      else            run_product(longint'($urandom) % M_LEGIT, longint'($urandom) % M_LEGIT);
    end
    for (int t = 0; t < 500; t++) run_fault(t % 5);
    run_product(1000, 100);         // a clean product again after the faults
    $display("legitimate=%0d overflowed=%0d wrapped_undetectable=%0d zero_operand=%0d faults_detected=%0d/%0d/%0d/%0d/%0d",
             n_legit, n_over, n_alias, n_zero, n_fault[0], n_fault[1], n_fault[2], n_fault[3], n_fault[4]);
    if (n_legit == 0) err("no legitimate product exercised");
    if (n_over == 0)  err("no overflow exercised");
    if (n_zero == 0)  err("no zero operand exercised");
    for (int i = 0; i < 5; i++) if (n_fault[i] == 0) err($sformatf("no fault detected in channel %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
