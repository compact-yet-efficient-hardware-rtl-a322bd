// tb_lcs: loads every memory and topology register through the host port and
// reads them back over the request / data-bus protocol. Checks the weight
// layout (layer 0 rows of NMAX words with the bias row at IMAX, later layers
// NMAX+1 rows with the bias row at NMAX), the coefficient reads (segment 3
// reads as 0/1), the one-clock read latency with back-to-back requests, the
// topology registers and the start pulse.
module tb_lcs;
  import ffp_pkg::*;
  import ffp_ref_pkg::*;

  localparam int IMAX = 5, NMAX = 3, LMAX = 3;
  localparam int W_DEPTH = (IMAX + 1) * NMAX + NMAX * (NMAX + 1) * (LMAX - 1);

  logic clk = 0, rst_n = 0;
  logic host_we = 0, host_start = 0;
  host_sel_t host_sel = H_INPUT;
  logic [15:0] host_addr = '0;
  frac_t host_wdata = FRAC_ZERO;
  logic start;
  logic [2:0] n_inputs;
  logic [1:0] n_layers;
  logic [1:0] layer_n [LMAX];
  logic [LMAX-1:0] layer_bias;
  logic req_valid = 0, req_bias = 0;
  req_kind_t req_kind = REQ_X;
  logic [1:0] req_layer = '0;
  logic [2:0] req_j = '0;
  logic [1:0] req_m = '0;
  logic [3:0] req_coef = '0;
  frac_t bus_data;
  logic bus_valid;
  int checks = 0, failures = 0;

  frac_t in_img [IMAX];
  frac_t w_img  [W_DEPTH];

  lcs #(.IMAX(IMAX), .NMAX(NMAX), .LMAX(LMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int waddr(int l, int j, int m);
    if (l == 0) return j * NMAX + m;
    return (IMAX + 1) * NMAX + (l - 1) * (NMAX + 1) * NMAX + j * NMAX + m;
  endfunction

  // Issue a stream of requests on consecutive clocks and check each reply
  // arrives exactly one clock later.
  task automatic rd(req_kind_t k, int l, int j, bit b, int m, int c, frac_t expect_w);
    @(negedge clk);
    req_valid = 1; req_kind = k; req_layer = 2'(l); req_j = 3'(j); req_bias = b;
    req_m = 2'(m); req_coef = 4'(c);
    @(negedge clk);
    req_valid = 0;
    check($sformatf("read kind %0d l%0d j%0d b%0d m%0d c%0d", k, l, j, b, m, c),
          bus_valid && bus_data == expect_w);
    if (bus_data != expect_w) $display("  got %h want %h", bus_data, expect_w);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (in_img[i]) begin in_img[i] = rand_frac(65536, 65535); hw(H_INPUT, i, in_img[i]); end
    foreach (w_img[i])  begin w_img[i]  = rand_frac(65536, 65535); hw(H_WEIGHT, i, w_img[i]); end
    for (int i = 0; i < 9; i++) hw(H_COEF, i, sig_coef(i));
    hw(H_NET, 0, mkf(0, 5, 0));
    hw(H_NET, 1, mkf(0, 3, 0));
    hw(H_LAYER, 0, mkf(0, 3, 1));
    hw(H_LAYER, 1, mkf(0, 2, 0));
    hw(H_LAYER, 2, mkf(0, 1, 1));
    check("topology registers", n_inputs == 5 && n_layers == 3 && layer_n[0] == 3 &&
          layer_n[1] == 2 && layer_n[2] == 1 && layer_bias == 3'b101);
    for (int i = 0; i < IMAX; i++) rd(REQ_X, 0, i, 0, 0, 0, in_img[i]);
    for (int l = 0; l < LMAX; l++) begin
      int rows;
      rows = (l == 0) ? IMAX : NMAX;
      for (int j = 0; j < rows; j++)
        for (int m = 0; m < NMAX; m++) rd(REQ_W, l, j, 0, m, 0, w_img[waddr(l, j, m)]);
      for (int m = 0; m < NMAX; m++) rd(REQ_W, l, 0, 1, m, 0, w_img[waddr(l, rows, m)]);
    end
    for (int c = 0; c < 12; c++) rd(REQ_COEF, 0, 0, 0, 0, c, sig_coef(c));
    // back-to-back requests
    @(negedge clk);
    req_valid = 1; req_kind = REQ_X; req_j = 3'd1;
    @(negedge clk);
    req_j = 3'd2;
    check("pipelined read 1", bus_valid && bus_data == in_img[1]);
    @(negedge clk);
    req_valid = 0;
    check("pipelined read 2", bus_valid && bus_data == in_img[2]);
    @(negedge clk);
    check("bus idle", !bus_valid);
    // start pulse
    @(negedge clk) host_start = 1;
    @(negedge clk) host_start = 0;
    check("start follows host_start", start);
    @(negedge clk);
    check("start is one pulse", !start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
