// tb_neuron: drives one neuron with the micro-operation sequences the control
// unit uses and compares with the bit-exact reference (ffp_ref_pkg):
//   * random weighted sums of 1..12 terms, accumulator checked after each;
//   * the framing stall: after MUL_D and SUM_3 'ready' must stay low for
//     exactly as many clocks as the reference needs shifts;
//   * the sigmoid sequence on random v in about [-12, 12]: segment choice
//     (comparator), result bit-exact, and within 0.02 of 1/(1+exp(-v));
//   * a disabled neuron ignores operations.
module tb_neuron;
  import ffp_pkg::*;
  import ffp_ref_pkg::*;

  logic       clk = 0, rst_n = 0, en = 1, op_valid = 0;
  neuron_op_t op = N_NOP;
  logic [1:0] cmp_shift = 2'd1;
  frac_t      x_in = FRAC_ZERO, w_in = FRAC_ZERO, r_in = FRAC_ZERO;
  frac_t      y, acc;
  logic       ready, lower;
  logic [1:0] seg;
  int checks = 0, failures = 0;
  int seg_seen [4];

  neuron dut (.clk(clk), .rst_n(rst_n), .en(en), .op_valid(op_valid), .op(op),
              .cmp_shift(cmp_shift), .x_in(x_in), .w_in(w_in), .r_in(r_in),
              .y(y), .acc(acc), .ready(ready), .lower(lower), .seg(seg));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Issue one operation; return the number of clocks 'ready' stayed low.
  task automatic do_op(neuron_op_t o, output int stall);
    stall = 0;
    @(negedge clk);
    op = o; op_valid = 1;
    @(negedge clk);
    op_valid = 0; op = N_NOP;
    while (!ready) begin
      @(negedge clk);
      stall++;
    end
  endtask

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic mac(frac_t x, frac_t w, frac_t acc_before);
    int st;
    frac_t p;
    x_in = x; w_in = w;
    do_op(N_LOAD_XW, st);
    do_op(N_MUL_N, st);
    do_op(N_MUL_D, st);
    p = ref_mul(x, w);
    check("product stall", st == ref_shifts(longint'(x.num) * w.num, longint'(x.den) * w.den));
    check("product value", y == p);
    do_op(N_SUM_1, st);
    do_op(N_SUM_2, st);
    do_op(N_SUM_3, st);
    do_op(N_ACC_WB, st);
  endtask

  task automatic sigmoid(frac_t v);
    int st, sg;
    frac_t e;
    real vr, err;
    r_in = v;
    do_op(N_ACC_LOAD, st);
    for (int s = 1; s <= 3; s++) begin
      cmp_shift = 2'(s);
      do_op(N_CMP, st);
    end
    sg = ref_seg(v);
    seg_seen[sg]++;
    check($sformatf("segment of %0d/%0d", v.num, v.den), seg == 2'(sg));
    do_op(N_LOAD_V, st);
    w_in = (sg < 3) ? sig_coef(3*sg) : FRAC_ZERO;
    do_op(N_LOAD_W, st);
    do_op(N_MUL_N, st);
    do_op(N_MUL_D, st);
    r_in = (sg < 3) ? sig_coef(3*sg + 1) : FRAC_ZERO;
    do_op(N_ACC_LOAD, st);
    do_op(N_SUM_1, st); do_op(N_SUM_2, st); do_op(N_SUM_3, st); do_op(N_ACC_WB, st);
    do_op(N_LOAD_B_ACC, st);
    do_op(N_MUL_N, st);
    do_op(N_MUL_D, st);
    r_in = (sg < 3) ? sig_coef(3*sg + 2) : FRAC_ZERO;
    do_op(N_ACC_LOAD, st);
    do_op(N_SUM_1, st); do_op(N_SUM_2, st); do_op(N_SUM_3, st); do_op(N_ACC_WB, st);
    do_op(N_SIG, st);
    e = ref_sigmoid(v);
    check($sformatf("sigmoid(%0d/%0d s%0d) = %0d/%0d want %0d/%0d", v.num, v.den, v.sign,
                    y.num, y.den, e.num, e.den), y == e);
    vr  = f2r(v);
    err = f2r(y) - 1.0 / (1.0 + $exp(-vr));
    if (err < 0) err = -err;
    check($sformatf("sigmoid accuracy v=%f err=%f", vr, err), err < 0.02);
  endtask

  initial begin
    int st;
    frac_t ref_acc, x, w;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int nterm;
      nterm = $urandom_range(12, 1);
      do_op(N_ACC_CLR, st);
      ref_acc = FRAC_ZERO;
      for (int k = 0; k < nterm; k++) begin
        x = rand_frac(65536, 65535);
        w = rand_frac(4000, 9000);
        mac(x, w, ref_acc);
        ref_acc = ref_add(ref_acc, ref_mul(x, w));
        check($sformatf("accumulator %0d/%0d want %0d/%0d", acc.num, acc.den, ref_acc.num, ref_acc.den),
              acc == ref_acc);
      end
    end
    for (int t = 0; t < 400; t++) begin
      frac_t v;
      v = mkf($urandom_range(12000, 0), $urandom_range(1500, 1000), 1'($urandom_range(1, 0)));
      if (t % 7 == 0) v = mkf($urandom_range(300, 0), $urandom_range(60, 1), 1'($urandom_range(1, 0)));
      sigmoid(v);
    end
    for (int s = 0; s < 4; s++) check($sformatf("segment %0d exercised", s), seg_seen[s] > 0);
    // a disabled neuron keeps its accumulator
    en = 0;
    r_in = mkf(5, 7, 0);
    do_op(N_ACC_LOAD, st);
    check("disabled neuron ignores operations", acc != r_in && ready);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
