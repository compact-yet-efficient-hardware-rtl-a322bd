// tb_annalu: runs two network layers on a 4-neuron hardware layer by hand,
// the way the control unit does, and compares Regy with the reference:
//   layer 1: 3 neurons active, 3 inputs from the data bus plus a bias term;
//   layer 2: 2 neurons active, inputs fed back from Regy, no bias.
// Each neuron's weights and per-segment sigmoid coefficients go through its
// own Regw. Also checks that the inactive neuron's Regy never changes and
// that ready_all waits for framing.
module tb_annalu;
  import ffp_pkg::*;
  import ffp_ref_pkg::*;

  localparam int NMAX = 4;
  logic clk = 0, rst_n = 0;
  logic op_valid = 0;
  neuron_op_t op = N_NOP;
  logic [1:0] cmp_shift = 2'd1;
  logic [2:0] active_n = '0;
  logic x_load = 0;
  x_src_t x_src = X_BUS;
  logic [1:0] x_idx = '0;
  frac_t bus_data = FRAC_ZERO;
  logic regw_we = 0;
  logic [1:0] regw_idx = '0;
  logic regy_capture = 0;
  frac_t y [NMAX];
  logic ready_all;
  logic [1:0] seg [NMAX];
  logic [NMAX-1:0] lower;
  int checks = 0, failures = 0, stalls = 0;

  annalu #(.NMAX(NMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_op(neuron_op_t o, int s = 1);
    @(negedge clk);
    op = o; op_valid = 1; cmp_shift = 2'(s);
    @(negedge clk);
    op_valid = 0; op = N_NOP;
    while (!ready_all) begin
      stalls++;
      @(negedge clk);
    end
  endtask

  task automatic set_w(int m, frac_t w);
    @(negedge clk);
    regw_we = 1; regw_idx = 2'(m); bus_data = w;
    @(negedge clk);
    regw_we = 0;
  endtask

  task automatic set_x(x_src_t src, int idx, frac_t d);
    @(negedge clk);
    x_load = 1; x_src = src; x_idx = 2'(idx); bus_data = d;
    @(negedge clk);
    x_load = 0;
  endtask

  task automatic mac_ops(bit with_acc_load);
    do_op(N_MUL_N);
    do_op(N_MUL_D);
    if (with_acc_load) do_op(N_ACC_LOAD);
    do_op(N_SUM_1); do_op(N_SUM_2); do_op(N_SUM_3); do_op(N_ACC_WB);
  endtask

  // One layer: xs are the term inputs (source, value), ws[m][j] the weights.
  task automatic run_layer(int n, x_src_t srcs[$], frac_t xs[$], frac_t ws[$][$], output frac_t out[$]);
    frac_t v;
    active_n = 3'(n);
    do_op(N_ACC_CLR);
    foreach (xs[j]) begin
      set_x(srcs[j], j, xs[j]);
      for (int m = 0; m < n; m++) set_w(m, ws[m][j]);
      do_op(N_LOAD_XW);
      mac_ops(0);
    end
    for (int s = 1; s <= 3; s++) do_op(N_CMP, s);
    out = {};
    for (int m = 0; m < n; m++) begin
      frac_t xm[$], wm[$];
      foreach (xs[j]) begin xm.push_back(xs[j]); wm.push_back(ws[m][j]); end
      v = ref_neuron(xm, wm);
      check($sformatf("segment neuron %0d", m), seg[m] == 2'(ref_seg(v)));
      out.push_back(ref_sigmoid(v));
    end
    do_op(N_LOAD_V);
    for (int k = 0; k < 3; k++) begin
      for (int m = 0; m < n; m++)
        set_w(m, (seg[m] < 3) ? sig_coef(3*seg[m] + k) : FRAC_ZERO);
      case (k)
        0: begin do_op(N_LOAD_W); do_op(N_MUL_N); do_op(N_MUL_D); end
        1: begin
          do_op(N_ACC_LOAD);
          do_op(N_SUM_1); do_op(N_SUM_2); do_op(N_SUM_3); do_op(N_ACC_WB);
        end
        default: begin do_op(N_LOAD_B_ACC); mac_ops(1); end
      endcase
    end
    do_op(N_SIG);
    @(negedge clk) regy_capture = 1;
    @(negedge clk) regy_capture = 0;
  endtask

  initial begin
    frac_t xs[$], ws[$][$], out1[$], out2[$], x2[$];
    x_src_t srcs[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // layer 1
    xs   = '{mkf(3, 2, 0), mkf(7, 5, 1), mkf(1, 3, 0), FRAC_ONE};
    srcs = '{X_BUS, X_BUS, X_BUS, X_ONE};
    for (int m = 0; m < 3; m++) begin
      frac_t row[$];
      row = {};
      for (int j = 0; j < 4; j++) row.push_back(mkf($urandom_range(200, 0), $urandom_range(400, 200), 1'($urandom_range(1, 0))));
      ws.push_back(row);
    end
    run_layer(3, srcs, xs, ws, out1);
    for (int m = 0; m < 3; m++)
      check($sformatf("layer 1 y%0d = %0d/%0d want %0d/%0d", m, y[m].num, y[m].den, out1[m].num, out1[m].den),
            y[m] == out1[m]);
    check("inactive neuron untouched", y[3] == FRAC_ZERO);
    $display("layer 1 outputs %0d/%0d %0d/%0d %0d/%0d", out1[0].num, out1[0].den, out1[1].num, out1[1].den, out1[2].num, out1[2].den);
    // layer 2, inputs fed back from Regy
    ws = {};
    for (int m = 0; m < 2; m++) begin
      frac_t row[$];
      row = {};
      for (int j = 0; j < 3; j++) row.push_back(mkf($urandom_range(600, 0), $urandom_range(600, 200), 1'($urandom_range(1, 0))));
      ws.push_back(row);
    end
    x2   = '{out1[0], out1[1], out1[2]};
    srcs = '{X_FEEDBACK, X_FEEDBACK, X_FEEDBACK};
    run_layer(2, srcs, x2, ws, out2);
    for (int m = 0; m < 2; m++)
      check($sformatf("layer 2 y%0d = %0d/%0d want %0d/%0d", m, y[m].num, y[m].den, out2[m].num, out2[m].den),
            y[m] == out2[m]);
    check("neuron 3 keeps its layer 1 output", y[2] == out1[2]);
    check("framing stalls seen", stalls > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
