// tb_mlp_full: the speech-recognition test network (220 inputs, a hidden
// layer of 24 neurons, 10 outputs, no biases) on the accelerator at its
// default size (IMAX 220, NMAX 24, LMAX 7). Inputs in [0,1) and weights in
// about [-0.15, 0.15] are random. The outputs are compared bit-exactly with
// the reference network and within 0.06 with a floating-point MLP, and the
// run time in clocks is checked against the bound of this implementation's
// schedule (per input term at most 7 Clk1 periods plus two framings of at
// most 17 shifts each, rounded up to Clk1 periods).
module tb_mlp_full;
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
    repeat (2000000) @(posedge clk);
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

  initial begin
    frac_t x[$], w[$], out[$];
    real cur[$], nxt[$];
    int cycles, bound;
    int ln[$];
    bit lb[$];
    ln = '{24, 10};
    lb = '{1'b0, 1'b0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < IMAX; i++) x.push_back(mkf($urandom_range(999, 0), 1000, 0));
    for (int i = 0; i < W_DEPTH; i++) w.push_back(mkf($urandom_range(150, 0), $urandom_range(1500, 1000), 1'($urandom_range(1, 0))));
    for (int i = 0; i < 9; i++) hw(H_COEF, i, sig_coef(i));
    for (int i = 0; i < IMAX; i++) hw(H_INPUT, i, x[i]);
    // only the words the network uses: layer 0 rows 0..219, layer 1 rows 0..23
    for (int j = 0; j < 220; j++) for (int m = 0; m < 24; m++) hw(H_WEIGHT, waddr(IMAX, NMAX, 0, j, m), w[waddr(IMAX, NMAX, 0, j, m)]);
    for (int j = 0; j < 24; j++) for (int m = 0; m < 10; m++) hw(H_WEIGHT, waddr(IMAX, NMAX, 1, j, m), w[waddr(IMAX, NMAX, 1, j, m)]);
    hw(H_NET, 0, mkf(0, 220, 0));
    hw(H_NET, 1, mkf(0, 2, 0));
    hw(H_LAYER, 0, mkf(0, 24, 0));
    hw(H_LAYER, 1, mkf(0, 10, 0));
    ref_network(IMAX, NMAX, 220, 2, ln, lb, x, w, out);

    @(negedge clk) host_start = 1;
    @(negedge clk) host_start = 0;
    cycles = 2;
    while (!busy) begin @(negedge clk); cycles++; end
    while (!done) begin @(negedge clk); cycles++; end

    foreach (out[m]) begin
      checks++;
      if (y[m] != out[m]) begin
        failures++;
        $display("FAIL y%0d = %0d/%0d want %0d/%0d", m, y[m].num, y[m].den, out[m].num, out[m].den);
      end
    end
    // floating-point MLP
    foreach (x[i]) cur.push_back(f2r(x[i]));
    for (int l = 0; l < 2; l++) begin
      nxt = {};
      for (int m = 0; m < ln[l]; m++) begin
        real v;
        v = 0.0;
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
        $display("FAIL y%0d = %f, floating point %f", m, f2r(y[m]), cur[m]);
      end
      $display("y%0d = %0d/%0d = %f (floating point %f)", m, y[m].num, y[m].den, f2r(y[m]), cur[m]);
    end
    // per term: 7 operations + 2 framings of <= 17 shifts (5 Clk1 each)
    bound = 4 * ((220 + 24) * (7 + 10) + 2 * (3 + 21 + 3 * 5) + 8);
    $display("network run: %0d clocks (bound %0d)", cycles, bound);
    checks++;
    if (cycles > bound) begin
      failures++;
      $display("FAIL run took %0d clocks, more than %0d", cycles, bound);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
