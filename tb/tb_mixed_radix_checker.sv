// tb_mixed_radix_checker: drives residues of integers across the whole range
// [0, 5386025) and compares the mixed-radix digits with those obtained by
// repeated division by 17, 19, 23, 25 in the testbench; the illegitimate flag
// must equal (X >= 185725). It then takes legitimate numbers, corrupts one
// residue at a time and requires the flag to rise for every such error.
module tb_mixed_radix_checker;
  import rns_pkg::*;

  int checks = 0, failures = 0;
  int n_legit = 0, n_over = 0, n_err = 0;
  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  residue_t x [N_MOD];
  residue_t a [N_MOD];
  logic     illegitimate;

  mixed_radix_checker dut (.x(x), .a(a), .illegitimate(illegitimate));

  localparam int MODS [5] = '{17, 19, 23, 25, 29};
  localparam int M_LEGIT = 17 * 19 * 23 * 25;
  localparam int M_TOTAL = M_LEGIT * 29;

  task automatic apply(int value);
    for (int i = 0; i < 5; i++) x[i] = residue_t'(value % MODS[i]);
  endtask

  task automatic check_digits(int value);
    int q;
    q = value;
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (int'(a[i]) != q % MODS[i]) begin
        failures++;
        if (failures < 20) $display("X=%0d digit %0d: got %0d expected %0d", value, i, a[i], q % MODS[i]);
      end
      q = q / MODS[i];
    end
    checks++;
    if (illegitimate !== (value >= M_LEGIT)) begin
      failures++;
      if (failures < 20) $display("X=%0d: illegitimate=%0b", value, illegitimate);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vals [$];
    vals = '{0, 1, 16, 17, 323, M_LEGIT - 1, M_LEGIT, M_LEGIT + 1, M_TOTAL - 1};
    for (int t = 0; t < 3000; t++)
      vals.push_back((t % 2) != 0 ? int'($urandom % M_LEGIT) : int'($urandom % M_TOTAL));
    foreach (vals[t]) begin
      apply(vals[t]);
      @(posedge clk);
      check_digits(vals[t]);
      if (vals[t] >= M_LEGIT) n_over++; else n_legit++;
    end
    // single residue errors on legitimate numbers
    for (int t = 0; t < 2000; t++) begin
      int value, ch, bad;
      value = int'($urandom % M_LEGIT);
      ch    = t % 5;
      apply(value);
      bad = (int'(x[ch]) + 1 + int'($urandom % (MODS[ch] - 1))) % MODS[ch];
      x[ch] = residue_t'(bad);
      @(posedge clk);
      checks++;
      n_err++;
      if (!illegitimate) begin
        failures++;
        if (failures < 20) $display("X=%0d residue %0d -> %0d not detected", value, ch, bad);
      end
    end
    $display("legitimate=%0d overflowed=%0d single_errors=%0d", n_legit, n_over, n_err);
    if (n_legit == 0 || n_over == 0 || n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
