// tb_mlp_configs: the three network sizes of the area study, run one after the
// other on the accelerator at its default size (IMAX 220, NMAX 24, LMAX 7),
// with no reset between them:
//   2 inputs,  3 layers of  6 neurons
//   4 inputs,  5 layers of  9 neurons
//   8 inputs,  7 layers of 13 neurons
// Every layer has a bias. For each network only the topology registers and the
// words it uses are rewritten. The outputs are compared bit-exactly with the
// reference network and within 0.06 with a floating-point MLP, and the run
// time in clocks is checked against the schedule's bound (per term at most 7
// Clk1 periods plus two framings of at most 17 shifts; per layer the sigmoid
// plus a few control periods; rounded up generously per layer).
module tb_mlp_configs;
  import ffp_pkg::*;
  import ffp_ref_pkg::*;

  localparam int IMAX = 220, NMAX = 24, LMAX = 7;
  localparam int W_DEPTH = (IMAX + 1) * NMAX + NMAX * (NMAX + 1) * (LMAX - 1);

  logic clk = 0, rst_n = 0;
  logic host_we = 0, host_start = 0;
  host_sel_t host_sel = H_INPUT;
  logic [15:0] host_addr = '0;
  frac_t host_wdata = FRAC_ZERO;
  frac_t y [NMAX];
  logic busy, done;
  int checks = 0, failures = 0;

  mlp_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hw(host_sel_t sel, int addr, frac_t d);
    @(negedge clk);
    host_we = 1; host_sel = sel; host_addr = 16'(addr); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic run_net(int n_in, int n_neu, int n_lay);
    frac_t x[$], w[$], out[$];
    real cur[$], nxt[$];
    int ln[$];
    bit lb[$];
    int cycles, bound;
    for (int l = 0; l < n_lay; l++) begin
      ln.push_back(n_neu);
      lb.push_back(1'b1);
    end
    for (int i = 0; i < n_in; i++) x.push_back(mkf($urandom_range(999, 0), 1000, 1'($urandom_range(1, 0))));
    for (int i = 0; i < W_DEPTH; i++) w.push_back(FRAC_ZERO);
    for (int l = 0; l < n_lay; l++) begin
      int rows, bias_row;
      rows = (l == 0) ? n_in : n_neu;
      bias_row = (l == 0) ? IMAX : NMAX;
      for (int j = 0; j <= rows; j++)
        for (int m = 0; m < n_neu; m++) begin
          int a;
          a = waddr(IMAX, NMAX, l, (j == rows) ? bias_row : j, m);
          w[a] = mkf($urandom_range(900, 0), $urandom_range(1000, 300), 1'($urandom_range(1, 0)));
          hw(H_WEIGHT, a, w[a]);
        end
    end
    for (int i = 0; i < n_in; i++) hw(H_INPUT, i, x[i]);
    hw(H_NET, 0, mkf(0, n_in, 0));
    hw(H_NET, 1, mkf(0, n_lay, 0));
    for (int l = 0; l < n_lay; l++) hw(H_LAYER, l, mkf(0, n_neu, 1));  // count in bits 15..0, bias flag in bit 16
    ref_network(IMAX, NMAX, n_in, n_lay, ln, lb, x, w, out);

    @(negedge clk) host_start = 1;
    @(negedge clk) host_start = 0;
    cycles = 2;
    while (!busy) begin @(negedge clk); cycles++; end
    while (!done) begin @(negedge clk); cycles++; end

    foreach (out[m]) begin
      checks++;
      if (y[m] != out[m]) begin
        failures++;
        $display("FAIL %0d-%0d-%0d y%0d = %0d/%0d want %0d/%0d", n_in, n_neu, n_lay,
                 m, y[m].num, y[m].den, out[m].num, out[m].den);
      end
    end
    foreach (x[i]) cur.push_back(f2r(x[i]));
    for (int l = 0; l < n_lay; l++) begin
      nxt = {};
      for (int m = 0; m < n_neu; m++) begin
        real v;
        v = f2r(w[waddr(IMAX, NMAX, l, (l == 0) ? IMAX : NMAX, m)]);
        foreach (cur[j]) v += cur[j] * f2r(w[waddr(IMAX, NMAX, l, j, m)]);
        nxt.push_back(1.0 / (1.0 + $exp(-v)));
      end
      cur = nxt;
    end
    foreach (cur[m]) begin
      real e;
      e = f2r(y[m]) - cur[m];
      if (e < 0) e = -e;
      checks++;
      if (e > 0.06) begin
        failures++;
        $display("FAIL %0d-%0d-%0d y%0d = %f, floating point %f", n_in, n_neu, n_lay,
                 m, f2r(y[m]), cur[m]);
      end
    end
    bound = 0;
    for (int l = 0; l < n_lay; l++)
      bound += 4 * ((((l == 0) ? n_in : n_neu) + 1) * (7 + 10) + 2 * (3 + 21 + 3 * 5) + 8 + NMAX);
    $display("network %0d inputs, %0d layers of %0d: %0d clocks (bound %0d)",
             n_in, n_lay, n_neu, cycles, bound);
    checks++;
    if (cycles > bound) begin
      failures++;
      $display("FAIL run took %0d clocks, more than %0d", cycles, bound);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 9; i++) hw(H_COEF, i, sig_coef(i));
    run_net(2, 6, 3);
    run_net(4, 9, 5);
    run_net(8, 13, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
