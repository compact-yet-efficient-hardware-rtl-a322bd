// tb_mlp_top: end-to-end test of the accelerator through its host port, at
// reduced size (8 inputs, 6 hardware neurons, 3 layers).
// Four jobs are loaded and run one after the other without reset, changing
// topology between them:
//   A: 8-5-3 network, bias on in both layers, moderate weights;
//   B: 6-6-2-4 network, bias only in the middle layer;
//   C: A's topology with huge inputs and weights (saturating framing);
//   D: 1-1 network with a bias and a negative weight.
// Every output is compared bit-exactly with the reference network, and for
// A and B also with a floating-point MLP (tolerance 0.06). The test counts
// how often each mechanism of the design happened and fails if one never
// did: framing shifts, framing longer than one Clk1 period, framing
// saturation, each polynomial segment, negative and non-negative weighted
// sums, subtraction in the fraction adder (either operand complemented),
// bias terms, feedback of outputs as inputs, weight loading overlapping the
// arithmetic, idle (switched-off) neurons, and a topology change.
module tb_mlp_top;
  import ffp_pkg::*;
  import ffp_ref_pkg::*;

  localparam int IMAX = 8, NMAX = 6, LMAX = 3;
  localparam int W_DEPTH = (IMAX + 1) * NMAX + NMAX * (NMAX + 1) * (LMAX - 1);

  logic clk = 0, rst_n = 0;
  logic host_we = 0, host_start = 0;
  host_sel_t host_sel = H_INPUT;
  logic [15:0] host_addr = '0;
  frac_t host_wdata = FRAC_ZERO;
  frac_t y [NMAX];
  logic busy, done;
  int checks = 0, failures = 0;

  mlp_top #(.IMAX(IMAX), .NMAX(NMAX), .LMAX(LMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_shift = 0, n_long_frame = 0, n_sat = 0, n_neg_v = 0, n_pos_v = 0;
  int n_twoc1 = 0, n_twoc2 = 0, n_bias = 0, n_feedback = 0, n_overlap = 0;
  int n_idle = 0, n_topology = 0;
  int n_seg [4] = '{0, 0, 0, 0};
  int stall_run = 0;
  bit in_term = 0;

  for (genvar m = 0; m < NMAX; m++) begin : g_mon
    always @(posedge clk) if (rst_n && dut.u_annch.u_annalu.n_en[m]) begin
      if (!dut.u_annch.u_annalu.g_neuron[m].u_neuron.u_frame.fits) begin
        n_shift++;
        if (dut.u_annch.u_annalu.g_neuron[m].u_neuron.u_frame.den_sh == 0) n_sat++;
      end
      if (dut.u_annch.op_valid && dut.u_annch.op == N_SUM_3) begin
        if (dut.u_annch.u_annalu.g_neuron[m].u_neuron.twoc1) n_twoc1++;
        if (dut.u_annch.u_annalu.g_neuron[m].u_neuron.twoc2) n_twoc2++;
      end
      if (dut.u_annch.op_valid && dut.u_annch.op == N_LOAD_V) begin
        if (dut.u_annch.u_annalu.g_neuron[m].u_neuron.acc_q.sign) n_neg_v++;
        else n_pos_v++;
        n_seg[dut.u_annch.u_annalu.g_neuron[m].u_neuron.seg_q]++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    // framing that outlasts a Clk1 period (more than four shifts) stalls the FSM
    if (!dut.u_annch.ready_all) stall_run++;
    else begin
      if (stall_run > 4) n_long_frame++;
      stall_run = 0;
    end
    if (dut.u_annch.x_load && dut.u_annch.x_src == X_ONE) n_bias++;
    if (dut.u_annch.x_load && dut.u_annch.x_src == X_FEEDBACK) n_feedback++;
    if (dut.u_annch.op_valid && dut.u_annch.op == N_LOAD_XW) in_term = 1;
    if (dut.u_annch.op_valid && dut.u_annch.op == N_ACC_WB) in_term = 0;
    if (in_term && dut.u_annch.req_valid) n_overlap++;
    if (dut.u_annch.op_valid && dut.u_annch.active_n < NMAX) n_idle++;
  end

  // ---------------- host helpers ----------------
  task automatic hw(host_sel_t sel, int addr, frac_t d);
    @(negedge clk);
    host_we = 1; host_sel = sel; host_addr = 16'(addr); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  function automatic real sigm(real v);
    return 1.0 / (1.0 + $exp(-v));
  endfunction

  task automatic run_job(string name, int n_in, int ln[$], bit lb[$], frac_t x[$], frac_t w[$], bit check_real);
    frac_t out[$];
    int cycles;
    cycles = 2;
    for (int i = 0; i < n_in; i++) hw(H_INPUT, i, x[i]);
    for (int i = 0; i < W_DEPTH; i++) hw(H_WEIGHT, i, w[i]);
    hw(H_NET, 0, mkf(0, n_in, 0));
    hw(H_NET, 1, mkf(0, ln.size(), 0));
    foreach (ln[l]) hw(H_LAYER, l, mkf(0, ln[l], lb[l]));
    ref_network(IMAX, NMAX, n_in, ln.size(), ln, lb, x, w, out);
    @(negedge clk) host_start = 1;
    @(negedge clk) host_start = 0;
    while (!busy) begin
      @(negedge clk);
      cycles++;
    end
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    // floating-point model of the same network
    if (check_real) begin
      real cur[$], nxt[$];
      foreach (x[i]) if (i < n_in) cur.push_back(f2r(x[i]));
      foreach (ln[l]) begin
        int rows;
        rows = (l == 0) ? IMAX : NMAX;
        nxt = {};
        for (int m = 0; m < ln[l]; m++) begin
          real v;
          v = 0.0;
          foreach (cur[j]) v += cur[j] * f2r(w[waddr(IMAX, NMAX, l, j, m)]);
          if (lb[l]) v += f2r(w[waddr(IMAX, NMAX, l, rows, m)]);
          nxt.push_back(sigm(v));
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
          $display("FAIL %s: y%0d = %f, floating point %f", name, m, f2r(y[m]), cur[m]);
        end
      end
    end
    foreach (out[m]) begin
      checks++;
      if (y[m] != out[m]) begin
        failures++;
        $display("FAIL %s: y%0d = %0d/%0d want %0d/%0d", name, m, y[m].num, y[m].den, out[m].num, out[m].den);
      end
    end
    $display("%s: %0d clocks", name, cycles);
  endtask

  initial begin
    frac_t x[$], w[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 9; i++) hw(H_COEF, i, sig_coef(i));

    // A
    x = {}; w = {};
    for (int i = 0; i < IMAX; i++) x.push_back(mkf($urandom_range(1000, 0), $urandom_range(1000, 200), 1'($urandom_range(1, 0))));
    for (int i = 0; i < W_DEPTH; i++) w.push_back(mkf($urandom_range(1500, 0), $urandom_range(1000, 400), 1'($urandom_range(1, 0))));
    run_job("A", 8, '{5, 3}, '{1'b1, 1'b1}, x, w, 1);
    // B
    x = {}; w = {};
    for (int i = 0; i < IMAX; i++) x.push_back(mkf($urandom_range(3000, 0), $urandom_range(1000, 200), 1'($urandom_range(1, 0))));
    for (int i = 0; i < W_DEPTH; i++) w.push_back(mkf($urandom_range(2500, 0), $urandom_range(700, 300), 1'($urandom_range(1, 0))));
    run_job("B", 6, '{6, 2, 4}, '{1'b0, 1'b1, 1'b0}, x, w, 1);
    n_topology++;
    // C: saturating framing
    x = {}; w = {};
    for (int i = 0; i < IMAX; i++) x.push_back(mkf($urandom_range(65535, 60000), $urandom_range(2, 1), 1'($urandom_range(1, 0))));
    for (int i = 0; i < W_DEPTH; i++) w.push_back(mkf($urandom_range(65535, 60000), $urandom_range(2, 1), 1'($urandom_range(1, 0))));
    run_job("C", 8, '{5, 3}, '{1'b1, 1'b1}, x, w, 0);
    n_topology++;
    // D: one neuron, negative weighted sum
    x = {}; w = {};
    for (int i = 0; i < IMAX; i++) x.push_back(mkf(3, 2, 0));
    for (int i = 0; i < W_DEPTH; i++) w.push_back(mkf(5, 4, 1));
    run_job("D", 1, '{1}, '{1'b1}, x, w, 1);
    n_topology++;

    $display("mechanisms: shifts=%0d long_framing=%0d saturation=%0d seg0..3=%0d/%0d/%0d/%0d neg_v=%0d pos_v=%0d",
             n_shift, n_long_frame, n_sat, n_seg[0], n_seg[1], n_seg[2], n_seg[3], n_neg_v, n_pos_v);
    $display("mechanisms: twoc1=%0d twoc2=%0d bias=%0d feedback=%0d overlap=%0d idle=%0d topology_changes=%0d",
             n_twoc1, n_twoc2, n_bias, n_feedback, n_overlap, n_idle, n_topology);
    checks += 15;
    if (n_shift == 0) begin failures++; $display("FAIL no framing shift"); end
    if (n_long_frame == 0) begin failures++; $display("FAIL no long framing"); end
    if (n_sat == 0) begin failures++; $display("FAIL no saturation"); end
    for (int s = 0; s < 4; s++) if (n_seg[s] == 0) begin failures++; $display("FAIL segment %0d never used", s); end
    if (n_neg_v == 0 || n_pos_v == 0) begin failures++; $display("FAIL sign of v not both seen"); end
    if (n_twoc1 == 0) begin failures++; $display("FAIL twoc1 never used"); end
    if (n_twoc2 == 0) begin failures++; $display("FAIL twoc2 never used"); end
    if (n_bias == 0) begin failures++; $display("FAIL no bias term"); end
    if (n_feedback == 0) begin failures++; $display("FAIL no feedback"); end
    if (n_overlap == 0) begin failures++; $display("FAIL no load overlap"); end
    if (n_idle == 0) begin failures++; $display("FAIL no idle neurons"); end
    if (n_topology == 0) begin failures++; $display("FAIL no topology change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
