// tb_anncu: the control unit on its own, against a model of the load and
// control system (a reply one clock after each request) and of the hardware
// layer (random framing stalls on ready_all, random segments per neuron).
// A three-layer network with inputs 3, layers of 4 (bias), 2 (no bias) and
// 3 (bias) neurons is run twice. Checked:
//   * the exact micro-operation stream of every layer (weighted sum terms,
//     then the three-step segment test and the two polynomial passes);
//   * operations only on Clk1 ticks with ready_all high;
//   * every weight requested once per term and neuron, the bias row for the
//     last term, inputs from the bus in layer 0 and from feedback later, 1/1
//     for bias terms, coefficient index 3*seg+k for each neuron;
//   * loading overlapping the arithmetic (requests while a term computes);
//   * Regy captured once per layer, done at the end, restart works.
module tb_anncu;
  import ffp_pkg::*;

  localparam int IMAX = 6, NMAX = 4, LMAX = 3;
  logic clk = 0, rst_n = 0, clk1_tick;
  logic start = 0;
  logic [2:0] n_inputs = 3'd3;
  logic [1:0] n_layers = 2'd3;
  logic [2:0] layer_n [LMAX] = '{3'd4, 3'd2, 3'd3};
  logic [LMAX-1:0] layer_bias = 3'b101;
  logic req_valid, req_bias;
  req_kind_t req_kind;
  logic [1:0] req_layer;
  logic [2:0] req_j;
  logic [1:0] req_m;
  logic [3:0] req_coef;
  logic bus_valid = 0;
  logic op_valid;
  neuron_op_t op;
  logic [1:0] cmp_shift;
  logic [2:0] active_n;
  logic x_load;
  x_src_t x_src;
  logic [1:0] x_idx;
  logic regw_we;
  logic [1:0] regw_idx;
  logic regy_capture;
  logic ready_all;
  logic [1:0] seg [NMAX];
  logic busy, done;
  logic [1:0] layer;
  int checks = 0, failures = 0;
  int phase = 0;

  anncu #(.IMAX(IMAX), .NMAX(NMAX), .LMAX(LMAX)) dut (.*);

  always #5 clk = ~clk;

  // Clk1 tick every fourth clock
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase <= 0; else phase <= (phase + 1) % 4;
  assign clk1_tick = (phase == 0);

  // hardware-layer model: random framing stalls after a framing operation
  int stall_left = 0;
  always @(posedge clk) begin
    if (op_valid && (op == N_MUL_D || op == N_SUM_3 || op == N_SIG))
      stall_left <= $urandom_range(9, 0);
    else if (stall_left > 0)
      stall_left <= stall_left - 1;
  end
  assign ready_all = (stall_left == 0);

  // LCS model
  always @(posedge clk) bus_valid <= rst_n && req_valid;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected operation stream
  neuron_op_t exp_ops[$];
  int exp_w_req[$], exp_c_req[$];
  function automatic void build_expect();
    int n_in;
    exp_ops = {};
    for (int l = 0; l < 3; l++) begin
      int terms;
      n_in  = (l == 0) ? 3 : int'(layer_n[l-1]);
      terms = n_in + int'(layer_bias[l]);
      exp_ops.push_back(N_ACC_CLR);
      for (int j = 0; j < terms; j++)
        exp_ops = {exp_ops, N_LOAD_XW, N_MUL_N, N_MUL_D, N_SUM_1, N_SUM_2, N_SUM_3, N_ACC_WB};
      exp_ops = {exp_ops, N_CMP, N_CMP, N_CMP, N_LOAD_V, N_LOAD_W, N_MUL_N, N_MUL_D,
                 N_ACC_LOAD, N_SUM_1, N_SUM_2, N_SUM_3, N_ACC_WB, N_LOAD_B_ACC, N_MUL_N,
                 N_MUL_D, N_ACC_LOAD, N_SUM_1, N_SUM_2, N_SUM_3, N_ACC_WB, N_SIG};
    end
  endfunction

  int op_idx = 0, captures = 0, w_reqs = 0, x_reqs = 0, c_reqs = 0, ones = 0, fbs = 0;
  int overlap = 0, cur_layer_ops = 0, bad_timing = 0, bad_req = 0, bad_active = 0;
  bit in_term = 0;
  logic [1:0] seg_seen;
  always @(posedge clk) if (rst_n) begin
    if (op_valid) begin
      if (!clk1_tick || !ready_all) bad_timing++;
      if (op_idx < exp_ops.size() && op != exp_ops[op_idx]) begin
        failures++;
        $display("FAIL op %0d: got %s want %s", op_idx, op.name(), exp_ops[op_idx].name());
      end
      if (active_n != layer_n[layer]) bad_active++;
      op_idx++;
      if (op == N_LOAD_XW) in_term = 1;
      if (op == N_ACC_WB)  in_term = 0;
    end
    if (req_valid) begin
      if (in_term) overlap++;
      case (req_kind)
        REQ_X: begin x_reqs++; if (layer != 0) bad_req++; end
        REQ_W: begin
          int n_in;
          w_reqs++;
          n_in = (layer == 0) ? 3 : int'(layer_n[layer-1]);
          if (req_bias != (int'(req_j) == n_in)) bad_req++;
          if (req_layer != layer) bad_req++;
        end
        default: begin
          c_reqs++;
          if (req_coef != 4'(3 * int'(seg[req_m])) + 4'(dut.lsw_k_q)) bad_req++;
        end
      endcase
    end
    if (x_load && x_src == X_ONE) ones++;
    if (x_load && x_src == X_FEEDBACK) fbs++;
    if (regy_capture) captures++;
  end

  initial begin
    foreach (seg[m]) seg[m] = 2'($urandom_range(3, 0));
    build_expect();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      op_idx = 0; captures = 0; w_reqs = 0; x_reqs = 0; c_reqs = 0; ones = 0; fbs = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      check("busy after start", busy);
      wait (done);
      check($sformatf("operation count %0d of %0d", op_idx, exp_ops.size()), op_idx == exp_ops.size());
      check("one Regy capture per layer", captures == 3);
      check("input words requested", x_reqs == 3);
      // weights: (3+1)*4 + 4*2 + (2+1)*3
      check($sformatf("weight words requested %0d", w_reqs), w_reqs == 16 + 8 + 9);
      check("coefficient words requested", c_reqs == 3 * (4 + 2 + 3));
      check("bias terms use 1/1", ones == 2);
      check("feedback inputs in later layers", fbs == 4 + 2);
    end
    check("operations only on ready Clk1 ticks", bad_timing == 0);
    check("request fields", bad_req == 0);
    check("active neuron count follows the layer", bad_active == 0);
    check("loading overlaps the weighted sum", overlap > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
